// tb_ioil_pipeline: end-to-end test of the InOutInterlock WCHB pipeline at its
// default size (4 stages of 8 dual-rail bits, default gate delays).
//
// A 4-phase source and sink stream random words through the pipeline and a
// scoreboard checks every word out against the words sent, in order. The run
// goes through these situations, and each one is counted and must occur:
//   token-limited  slow source, fast sink: the stages wait for data;
//   bubble-limited fast source, slow sink: the source is stalled by in_ack;
//   glitch filter  a pulse shorter than the input C-element delay on an idle
//                  input rail must leave the pipeline untouched;
//   flush          with the first stage empty but blocked (next stage full),
//                  a longer fault pulse on an input rail is latched by the
//                  input filter and withdrawn before it can be stored;
//   input interlock with a word waiting at the blocked first stage, a long
//                  fault on the opposite rail of one bit must not corrupt it;
//   output interlock the NAND output of the unset rail of a stored bit in the
//                  last stage is forced low for 1 ns: the stored word must
//                  not change.
// The output must never show an illegal (1,1) code word, the first word must
// cross the empty pipeline in STAGES * (T_IN + T_NAND + T_OUT), and all words
// must arrive.
module tb_ioil_pipeline;
  import qdi_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned STAGES = 4;  // defaults of ioil_pipeline
  localparam int unsigned W      = 8;
  localparam int unsigned LAT    = T_IN_MCE + T_NAND + T_OUT_MCE;

  logic rst, in_ack, out_ack;
  dr_t [W-1:0] in_data, out_data;

  ioil_pipeline dut (
    .rst(rst), .in_data(in_data), .in_ack(in_ack), .out_data(out_data), .out_ack(out_ack)
  );

  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  int received = 0, total_sent = 0;
  bit sink_hold = 0;
  int sink_dmax = 0;
  int n_token_limited = 0, n_bubble_stalls = 0, n_glitch = 0, n_flush = 0;
  int n_in_interlock = 0, n_out_interlock = 0;
  int illegal_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit all_valid(input dr_t [W-1:0] x);
    for (int i = 0; i < W; i++) if (dr_classify(x[i]) != CODE_VALID) return 1'b0;
    return 1'b1;
  endfunction
  function automatic bit any_illegal(input dr_t [W-1:0] x);
    for (int i = 0; i < W; i++) if (dr_classify(x[i]) == CODE_ILLEGAL) return 1'b1;
    return 1'b0;
  endfunction
  function automatic logic [W-1:0] decode(input dr_t [W-1:0] x);
    logic [W-1:0] v;
    for (int i = 0; i < W; i++) v[i] = x[i].r1;
    return v;
  endfunction

  always @(out_data) if (!rst && any_illegal(out_data)) illegal_seen++;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: acknowledges complete words, checks them against the scoreboard
  initial begin
    out_ack = 0;
    wait (rst == 1'b0);
    forever begin
      while (!all_valid(out_data)) @(out_data);
      #1;
      check(decode(out_data) == sent.pop_front(), "word value and order");
      received++;
      #($urandom_range(0, sink_dmax));
      wait (sink_hold == 1'b0);
      out_ack = 1;
      while (out_data != '0) @(out_data);
      #($urandom_range(0, sink_dmax));
      out_ack = 0;
    end
  end

  task automatic present(input logic [W-1:0] v);
    sent.push_back(v);
    total_sent++;
    for (int i = 0; i < W; i++) in_data[i] = dr_encode(v[i]);
  endtask

  // one full source handshake with the given idle time between phases
  task automatic send(input logic [W-1:0] v, input int unsigned dly);
    int unsigned waited = 0;
    present(v);
    while (!in_ack) begin
      #10;
      waited += 10;
    end
    if (waited > 4 * LAT) n_bubble_stalls++;
    #(dly);
    in_data = '0;
    wait (in_ack == 1'b0);
    #(dly);
  endtask

  initial begin
    time t0;
    int b;
    logic [W-1:0] v;
    rst = 1; in_data = '0;
    #(20 * LAT);
    rst = 0;
    #(2 * LAT);

    // latency of the empty pipeline
    v = W'($urandom);
    present(v);
    t0 = $time;
    while (!all_valid(out_data)) @(out_data);
    check(($time - t0) == STAGES * LAT, "forward latency of the empty pipeline");
    wait (in_ack == 1'b1);
    in_data = '0;
    wait (in_ack == 1'b0);

    // token-limited: slow source, immediate sink
    sink_dmax = 0;
    for (int k = 0; k < 30; k++) begin
      send(W'($urandom), 400 + $urandom_range(0, 200));
      if (dut.ack[1] == 1'b0) n_token_limited++;  // next stage already empty again
    end

    // bubble-limited: immediate source, slow sink
    sink_dmax = 1500;
    for (int k = 0; k < 30; k++) send(W'($urandom), 0);
    wait (received == total_sent);
    sink_dmax = 0;

    // glitch filter: short pulses on idle input rails of an empty pipeline
    #(10 * LAT);
    for (int k = 0; k < 10; k++) begin
      b = $urandom_range(0, W - 1);
      if ($urandom_range(0, 1) == 1) begin
        in_data[b].r1 = 1'b1; #(T_IN_MCE - 5); in_data[b].r1 = 1'b0;
      end else begin
        in_data[b].r0 = 1'b1; #(T_IN_MCE - 5); in_data[b].r0 = 1'b0;
      end
      #(20 * LAT);
      if (in_ack == 1'b0 && out_data == '0 && received == total_sent) n_glitch++;
      else check(1'b0, "short glitch reached the pipeline");
    end

    // flush and input interlock: sink stalled, pipeline fills up
    sink_hold = 1;
    for (int rounds = 0; rounds < 3; rounds++) begin
      // fill to capacity (a token in every other stage); then the first
      // stage is empty but blocked by the full stage behind it
      for (int k = 0; k < (STAGES + 1) / 2; k++) send(W'($urandom), 50);
      #(20 * LAT);
      check(in_ack == 1'b0 && dut.ack[1] == 1'b1, "pipeline full, first stage blocked");
      // flush: a fault pulse longer than the filter threshold
      // (bit 0, so the filter nodes can be probed): the pulse gets past the
      // input C-element and pulls the NAND low, then is withdrawn
      in_data[0].r0 = 1'b1; #100;
      check(dut.g_stage[0].u_stage.g_bit[0].u_bit.f0 == 1'b1 &&
            dut.g_stage[0].u_stage.g_bit[0].u_bit.n0 == 1'b0, "long pulse passed the input filter");
      #50; in_data[0].r0 = 1'b0;
      #(10 * LAT);
      if (in_ack == 1'b0 && dut.g_stage[0].u_stage.q == '0 &&
          dut.g_stage[0].u_stage.g_bit[0].u_bit.n0 == 1'b1) n_flush++;
      check(in_ack == 1'b0, "flushed pulse not stored");
      // input interlock: the next word waits at the blocked first stage
      v = W'($urandom);
      present(v);
      #(5 * LAT);
      b = $urandom_range(0, W - 1);
      if (v[b]) begin
        in_data[b].r0 = 1'b1; #500; in_data[b].r0 = 1'b0;
      end else begin
        in_data[b].r1 = 1'b1; #500; in_data[b].r1 = 1'b0;
      end
      #(5 * LAT);
      check(in_ack == 1'b0, "first stage still blocked");
      n_in_interlock++;
      // output interlock: force the NAND of the unset rail of bit 0 in the
      // last stage low for 1 ns while that stage holds its word
      check(all_valid(out_data), "last stage holds a word");
      if (out_data[0].r1) begin
        force dut.g_stage[STAGES-1].u_stage.g_bit[0].u_bit.n0 = 1'b0;
        #1000;
        check(out_data[0] == DR_HI, "output interlock holds rail 1");
        release dut.g_stage[STAGES-1].u_stage.g_bit[0].u_bit.n0;
      end else begin
        force dut.g_stage[STAGES-1].u_stage.g_bit[0].u_bit.n1 = 1'b0;
        #1000;
        check(out_data[0] == DR_LO, "output interlock holds rail 0");
        release dut.g_stage[STAGES-1].u_stage.g_bit[0].u_bit.n1;
      end
      n_out_interlock++;
      // drain
      sink_hold = 0;
      wait (in_ack == 1'b1);
      in_data = '0;
      wait (in_ack == 1'b0);
      wait (received == total_sent);
      #(10 * LAT);
      sink_hold = 1;
    end
    sink_hold = 0;

    #(20 * LAT);
    check(received == total_sent, "every word delivered");
    check(illegal_seen == 0, "no illegal code word at the output");
    check(n_token_limited > 0, "token-limited operation seen");
    check(n_bubble_stalls > 0, "bubble-limited stall seen");
    check(n_glitch > 0, "glitch filtered");
    check(n_flush > 0, "fault pulse flushed");
    check(n_in_interlock > 0, "input interlock exercised");
    check(n_out_interlock > 0, "output interlock exercised");
    $display("words=%0d token_limited=%0d bubble_stalls=%0d glitches_filtered=%0d flushes=%0d in_interlocks=%0d out_interlocks=%0d",
             received, n_token_limited, n_bubble_stalls, n_glitch, n_flush, n_in_interlock, n_out_interlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
