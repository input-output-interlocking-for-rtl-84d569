// tb_ioil_wchb_bit: self-checking test of one InOutInterlock WCHB bit.
// The testbench plays both neighbours: it drives the dual-rail input and the
// acknowledge of the next stage. Directed cases cover the 4-phase cycle and
// its latency, a short glitch on an idle rail (filtered), a long fault on the
// opposite rail while waiting for the acknowledge (input interlock), a fault
// pulse that is flushed before the acknowledge arrives, simultaneous rails
// (neither captured), and a fault forced onto a glitch-filter NAND output
// while the other rail is stored (output interlock). A monitor counts any
// illegal (1,1) code word on the output outside the forced-fault window.
module tb_ioil_wchb_bit;
  import qdi_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TI = 30, TN = 10, TO = 30;
  localparam int unsigned LAT = TI + TN + TO;

  logic rst, ack;
  dr_t  d, q;
  int checks = 0, failures = 0;
  int illegal_seen = 0;

  ioil_wchb_bit #(.T_IN(TI), .T_NG(TN), .T_OUT(TO)) dut (.rst(rst), .d(d), .ack(ack), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: d=%b%b ack=%b q=%b%b", what, $time, d.r1, d.r0, ack, q.r1, q.r0);
    end
  endtask

  always @(q) if (!rst && dr_classify(q) == CODE_ILLEGAL) illegal_seen++;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // complete one 4-phase cycle of value v with a quiet environment
  task automatic cycle(input logic v);
    ack = 0;
    d = dr_encode(v);
    #(LAT + 20);
    check(q == dr_encode(v), "token stored");
    ack = 1; #(LAT);
    check(q == dr_encode(v), "held while input valid");
    d = DR_NULL; #(LAT + 20);
    check(q == DR_NULL, "returned to NULL");
    ack = 0; #(LAT);
  endtask

  initial begin
    time t0;
    rst = 1; d = DR_NULL; ack = 0;
    #(5 * LAT);
    check(q == DR_NULL, "reset");
    rst = 0;
    #(LAT);

    // plain cycles
    for (int i = 0; i < 20; i++) cycle(1'($urandom_range(0, 1)));

    // latency: rail to output exactly T_IN + T_NAND + T_OUT
    d = DR_HI; t0 = $time;
    wait (q.r1 == 1'b1);
    check(($time - t0) == time'(LAT), "forward latency");
    ack = 1; d = DR_NULL; wait (q == DR_NULL); ack = 0; #(LAT);

    // short glitch on an idle rail, token-limited (ack low): filtered
    d.r0 = 1; #(TI - 5); d.r0 = 0; #(3 * LAT);
    check(q == DR_NULL, "short glitch filtered");

    // bubble-limited: ack high (next stage busy), valid rail arrives,
    // then a long fault on the opposite rail before ack falls
    ack = 1; #(LAT);
    d.r1 = 1; #(2 * TI);
    d.r0 = 1; #300; d.r0 = 0;
    #20; ack = 0; #(LAT + 20);
    check(q == DR_HI, "input interlock keeps first rail");
    ack = 1; d = DR_NULL; #(LAT + 20); ack = 0; #(LAT);

    // flush: a fault pulse longer than the filter threshold while waiting
    // for the acknowledge, then the real token on the other rail
    ack = 1; #(LAT);
    d.r0 = 1; #100; d.r0 = 0; #(LAT);
    check(q == DR_NULL, "flushed pulse not stored while ack high");
    d.r1 = 1; #(2 * TI); ack = 0; #(LAT + 20);
    check(q == DR_HI, "true token stored after flush");
    ack = 1; d = DR_NULL; #(LAT + 20); ack = 0; #(LAT);

    // simultaneous rails: neither is captured (stall, no code error)
    d = DR_ILLEGAL; #(3 * LAT);
    check(q == DR_NULL, "simultaneous rails blocked");
    d = DR_NULL; #(LAT);

    // output interlock: fault forces NAND of rail 0 low while rail 1 stored
    d = DR_HI; #(LAT + 20);
    check(q == DR_HI, "stored before forced fault");
    force dut.n0 = 1'b0;
    #1000;
    check(q == DR_HI, "output interlock blocks rail 0");
    release dut.n0;
    #(LAT);
    ack = 1; d = DR_NULL; #(LAT + 20); ack = 0; #(LAT);
    check(q == DR_NULL, "recovers after forced fault");

    check(illegal_seen == 0, "no illegal code word on the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
