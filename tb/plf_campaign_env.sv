// plf_campaign_env: single-fault injection campaign on one InOutInterlock
// WCHB pipeline of W dual-rail bits (4 stages), across pipeline load factors.
//
// The pipeline load factor (PLF) is set as the ratio of the sink's response
// time to the source's: PLF < 1 is token-limited (stages wait for data),
// PLF > 1 bubble-limited (stages wait for the acknowledge). For each PLF of
// 1/4, 1/2, 1, 2 and 4 the environment runs a fault-free transfer and RUNS
// faulty ones. Each run resets the pipeline, streams NW random words and
// injects one fault: a randomly chosen signal is forced to a random value for
// a random time at a random moment. Sites are the pipeline's input rails and
// the nodes of bit 0 of the second stage (its input rails, input-filter
// outputs, NAND outputs, stored rails and its acknowledge). Each run is
// classified as masked, value error (wrong word delivered), code error (an
// illegal (1,1) word seen at the pipeline output) or deadlock (the transfer
// did not finish).
//
// Checks: fault-free runs deliver every word at every PLF; a fault on an input
// rail never produces an illegal code word at the output; a fault pulse on an
// input rail shorter than the input C-element delay is always masked. Tallies
// per PLF and per site are printed. checks/failures are valid once done is 1.
module plf_campaign_env
  import qdi_pkg::*;
#(
  parameter int unsigned W = 8
) (
  output int checks,
  output int failures,
  output bit done
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NW      = 6;       // words per run
  localparam int unsigned RUNS    = 300;     // faulty runs per PLF
  localparam int unsigned BASE    = 200;     // source response time, ps
  localparam int unsigned TMO     = 20000;   // handshake timeout, ps
  localparam int unsigned NSITES  = 10;
  localparam int unsigned PW_MIN  = 5;       // fault pulse width range, ps
  localparam int unsigned PW_MAX  = 300;

  // PLF in quarters: 1/4, 1/2, 1, 2, 4
  localparam int unsigned PLF_Q [5] = '{1, 2, 4, 8, 16};

  typedef enum int {OUT_MASKED, OUT_VALUE, OUT_CODE, OUT_DEADLOCK} outcome_e;

  logic rst, in_ack, out_ack;
  dr_t [W-1:0] src_data, in_data, out_data;
  dr_t [W-1:0] fmask, fval;   // fault overlay on the input rails

  assign in_data = (src_data & ~fmask) | (fval & fmask);

  ioil_pipeline #(.WIDTH(W)) dut (
    .rst(rst), .in_data(in_data), .in_ack(in_ack), .out_data(out_data), .out_ack(out_ack)
  );

  int tally [5][4];
  int site_tally [NSITES][4];
  bit code_err, timeout_hit;
  logic [W-1:0] words_in [NW];
  logic [W-1:0] words_out [NW];
  int n_out;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d-bit] %s at %0t", W, what, $time);
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

  always @(out_data) if (!rst && any_illegal(out_data)) code_err = 1'b1;


  // wait for a condition with a timeout; sets timeout_hit on expiry
  `define WAIT_TMO(cond) \
    begin int unsigned t_ = 0; \
      while (!(cond) && t_ < TMO) begin #5; t_ += 5; end \
      if (!(cond)) timeout_hit = 1'b1; end

  task automatic source(input int unsigned dly);
    for (int k = 0; k < NW && !timeout_hit; k++) begin
      for (int i = 0; i < W; i++) src_data[i] = dr_encode(words_in[k][i]);
      `WAIT_TMO(in_ack == 1'b1)
      #(dly);
      src_data = '0;
      `WAIT_TMO(in_ack == 1'b0)
      #(dly);
    end
  endtask

  task automatic sink(input int unsigned dly);
    for (int k = 0; k < NW && !timeout_hit; k++) begin
      `WAIT_TMO(all_valid(out_data))
      #(dly);
      if (timeout_hit) break;
      words_out[n_out] = decode(out_data);
      n_out++;
      out_ack = 1'b1;
      `WAIT_TMO(out_data == '0)
      #(dly);
      out_ack = 1'b0;
    end
  endtask

  task automatic force_site(input int site, input logic val, input int unsigned width);
    int b;
    b = $urandom_range(0, W - 1);
    case (site)
      0: begin fmask[b].r0 = 1'b1; fval[b].r0 = val; #(width); fmask[b].r0 = 1'b0; end
      1: begin fmask[b].r1 = 1'b1; fval[b].r1 = val; #(width); fmask[b].r1 = 1'b0; end
      2: if (val) begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.f0 = 1'b1; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.f0; end
         else     begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.f0 = 1'b0; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.f0; end
      3: if (val) begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.f1 = 1'b1; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.f1; end
         else     begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.f1 = 1'b0; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.f1; end
      4: if (val) begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.n0 = 1'b1; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.n0; end
         else     begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.n0 = 1'b0; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.n0; end
      5: if (val) begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.n1 = 1'b1; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.n1; end
         else     begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.n1 = 1'b0; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.n1; end
      6: if (val) begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.q0 = 1'b1; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.q0; end
         else     begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.q0 = 1'b0; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.q0; end
      7: if (val) begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.q1 = 1'b1; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.q1; end
         else     begin force dut.g_stage[1].u_stage.g_bit[0].u_bit.q1 = 1'b0; #(width); release dut.g_stage[1].u_stage.g_bit[0].u_bit.q1; end
      8: if (val) begin force dut.ack[2] = 1'b1; #(width); release dut.ack[2]; end
         else     begin force dut.ack[2] = 1'b0; #(width); release dut.ack[2]; end
      default: if (val) begin force dut.data[1][0].r0 = 1'b1; #(width); release dut.data[1][0].r0; end
               else     begin force dut.data[1][0].r0 = 1'b0; #(width); release dut.data[1][0].r0; end
    endcase
  endtask

  // one transfer of NW words; site < 0 means fault-free
  task automatic run(input int plf_q, input int site, input logic val,
                     input int unsigned width, input int unsigned at,
                     output outcome_e res);
    int unsigned src_dly, snk_dly;
    src_dly = BASE;
    snk_dly = BASE * plf_q / 4;
    rst = 1'b1; src_data = '0; fmask = '0; fval = '0; out_ack = 1'b0;
    code_err = 1'b0; timeout_hit = 1'b0; n_out = 0;
    for (int k = 0; k < NW; k++) words_in[k] = W'($urandom);
    #(1000);
    rst = 1'b0;
    #(200);
    fork
      source(src_dly);
      sink(snk_dly);
      if (site >= 0) begin
        #(at);
        force_site(site, val, width);
      end
    join
    #(500);
    if (timeout_hit || n_out != NW) res = OUT_DEADLOCK;
    else if (code_err) res = OUT_CODE;
    else begin
      res = OUT_MASKED;
      for (int k = 0; k < NW; k++) if (words_out[k] != words_in[k]) res = OUT_VALUE;
    end
  endtask

  initial begin
    outcome_e res;
    int site;
    logic val;
    int unsigned width, at, span;
    int in_rail_code_errors, short_in_faults, short_in_errors;

    checks = 0; failures = 0; done = 1'b0;
    in_rail_code_errors = 0; short_in_faults = 0; short_in_errors = 0;
    foreach (tally[p, o]) tally[p][o] = 0;
    foreach (site_tally[s, o]) site_tally[s][o] = 0;

    for (int p = 0; p < 5; p++) begin
      // fault-free reference run
      run(PLF_Q[p], -1, 1'b0, 0, 0, res);
      check(res == OUT_MASKED, "fault-free transfer completes");
      span = NW * 2 * (BASE + BASE * PLF_Q[p] / 4 + 300);
      for (int r = 0; r < RUNS; r++) begin
        site  = $urandom_range(0, NSITES - 1);
        val   = 1'($urandom_range(0, 1));
        width = $urandom_range(PW_MIN, PW_MAX);
        at    = $urandom_range(0, span);
        run(PLF_Q[p], site, val, width, at, res);
        tally[p][res]++;
        site_tally[site][res]++;
        if (site <= 1 && res == OUT_CODE) in_rail_code_errors++;
        if (site <= 1 && width < T_IN_MCE) begin
          short_in_faults++;
          if (res != OUT_MASKED) short_in_errors++;
        end
      end
      // extra short pulses on input rails
      for (int r = 0; r < 10; r++) begin
        site  = $urandom_range(0, 1);
        width = $urandom_range(1, T_IN_MCE - 1);
        at    = $urandom_range(0, span);
        run(PLF_Q[p], site, 1'b1, width, at, res);
        short_in_faults++;
        if (res != OUT_MASKED) short_in_errors++;
      end
      $display("%0d-bit PLF %0d/4: runs=%0d masked=%0d value_err=%0d code_err=%0d deadlock=%0d",
               W, PLF_Q[p], RUNS, tally[p][OUT_MASKED], tally[p][OUT_VALUE],
               tally[p][OUT_CODE], tally[p][OUT_DEADLOCK]);
    end
    for (int s = 0; s < NSITES; s++)
      $display("%0d-bit site %0d: masked=%0d value_err=%0d code_err=%0d deadlock=%0d", W, s,
               site_tally[s][OUT_MASKED], site_tally[s][OUT_VALUE],
               site_tally[s][OUT_CODE], site_tally[s][OUT_DEADLOCK]);
    $display("%0d-bit short input-rail faults=%0d, not masked=%0d", W, short_in_faults, short_in_errors);
    check(in_rail_code_errors == 0, "no code error from input-rail faults");
    check(short_in_errors == 0, "input-rail pulses shorter than the filter threshold are masked");
    check(short_in_faults > 0, "short input-rail faults injected");
    done = 1'b1;
  end
endmodule
