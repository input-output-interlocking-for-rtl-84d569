// tb_qdi_pkg: self-checking test of the dual-rail helpers in qdi_pkg.
// All four rail patterns are classified and compared with the encoding table
// (00 NULL, 01/10 valid, 11 illegal), and encode/decode are checked to be
// inverse for both values.
module tb_qdi_pkg;
  import qdi_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dr_t x;
    x = '{r1: 1'b0, r0: 1'b0}; check(dr_classify(x) == CODE_NULL, "00 is NULL");
    x = '{r1: 1'b0, r0: 1'b1}; check(dr_classify(x) == CODE_VALID, "01 is valid");
    x = '{r1: 1'b1, r0: 1'b0}; check(dr_classify(x) == CODE_VALID, "10 is valid");
    x = '{r1: 1'b1, r0: 1'b1}; check(dr_classify(x) == CODE_ILLEGAL, "11 is illegal");
    x = dr_encode(1'b1); check(x.r1 == 1'b1 && x.r0 == 1'b0, "HI on rail 1");
    x = dr_encode(1'b0); check(x.r1 == 1'b0 && x.r0 == 1'b1, "LO on rail 0");
    check(dr_value(dr_encode(1'b1)) == 1'b1, "decode HI");
    check(dr_value(dr_encode(1'b0)) == 1'b0, "decode LO");
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
