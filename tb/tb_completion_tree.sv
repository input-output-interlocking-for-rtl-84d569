// tb_completion_tree: self-checking test of the dual-rail completion detector.
// Bits are set to random code words one at a time in random order: done must
// stay low until the last bit is valid and then rise; bits are then cleared
// one at a time: done must stay high until the last bit is NULL. Run with a
// width that is not a power of two to exercise the uneven tree.
module tb_completion_tree;
  import qdi_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 5;
  localparam int unsigned DLY = 20;
  localparam int unsigned SETTLE = DLY * 8;

  logic rst, done;
  dr_t [W-1:0] d;
  int checks = 0, failures = 0;

  completion_tree #(.WIDTH(W), .DLY(DLY)) dut (.rst(rst), .d(d), .done(done));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: done=%b", what, $time, done);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[W];
    rst = 1; d = '0;
    #(SETTLE);
    rst = 0;
    check(done == 1'b0, "reset");
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < W; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        d[order[i]] = dr_encode(1'($urandom_range(0, 1)));
        #(SETTLE);
        check(done == (i == W - 1), "rise only when all valid");
      end
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        d[order[i]] = DR_NULL;
        #(SETTLE);
        check(done == (i != W - 1), "fall only when all NULL");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
