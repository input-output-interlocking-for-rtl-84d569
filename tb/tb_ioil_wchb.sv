// tb_ioil_wchb: self-checking test of one InOutInterlock WCHB stage.
// A 4-phase source and sink surround the stage and stream random words with
// random source and sink delays (both token- and bubble-limited). Every word
// must come out unchanged and in order; ack_out must follow the stored word
// (high once every bit holds data, low once all are NULL); the forward latency
// of an empty stage is checked; the output is never an illegal code word.
module tb_ioil_wchb;
  import qdi_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 4;
  localparam int unsigned TI = 30, TN = 10, TO = 30, TC = 20;
  localparam int unsigned LAT = TI + TN + TO;
  localparam int unsigned NWORDS = 200;

  logic rst, ack_out, ack_in;
  dr_t [W-1:0] d, q;
  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  int received = 0;

  ioil_wchb #(.WIDTH(W), .T_IN(TI), .T_NG(TN), .T_OUT(TO), .T_C(TC)) dut (
    .rst(rst), .d(d), .ack_out(ack_out), .q(q), .ack_in(ack_in)
  );

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
  function automatic bit all_null(input dr_t [W-1:0] x);
    return x == '0;
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

  int illegal_seen = 0;
  always @(q) if (!rst && any_illegal(q)) illegal_seen++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    logic [W-1:0] v;
    time t0;
    rst = 1; d = '0;
    #(10 * LAT);
    rst = 0;
    #(LAT);
    for (int k = 0; k < NWORDS; k++) begin
      v = W'($urandom);
      sent.push_back(v);
      for (int i = 0; i < W; i++) d[i] = dr_encode(v[i]);
      t0 = $time;
      if (k == 0) begin
        while (!all_valid(q)) @(q);
        check(($time - t0) == time'(LAT), "forward latency of an empty stage");
      end
      wait (ack_out == 1'b1);
      check(all_valid(q), "ack_out high only with a complete word");
      #($urandom_range(0, 150));
      d = '0;
      wait (ack_out == 1'b0);
      check(all_null(q), "ack_out low only with an empty stage");
      #($urandom_range(0, 150));
    end
  end

  // sink
  initial begin
    ack_in = 0;
    wait (rst == 1'b0);
    for (int k = 0; k < NWORDS; k++) begin
      while (!all_valid(q)) @(q);
      #1;
      check(decode(q) == sent.pop_front(), "word value and order");
      received++;
      #($urandom_range(0, 300));
      ack_in = 1;
      while (!all_null(q)) @(q);
      #($urandom_range(0, 300));
      ack_in = 0;
    end
    #(4 * LAT);
    check(received == NWORDS, "all words received");
    check(illegal_seen == 0, "no illegal code word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
