// tb_in_filter_mce: self-checking test of the asymmetric input C-element.
// Reference rule: the output rises only when the guarded rail is high while
// the opposite rail is low, falls whenever the guarded rail is low, and holds
// otherwise. Random steps plus directed cases: lock-out by the opposite rail,
// hold when the opposite rail rises late, exact delay, short-pulse filtering.
module tb_in_filter_mce;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 30;

  logic rst, d_self, d_other, f;
  int checks = 0, failures = 0;
  logic model;

  in_filter_mce #(.DLY(DLY)) dut (.rst(rst), .d_self(d_self), .d_other(d_other), .f(f));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: d_self=%b d_other=%b f=%b", what, $time, d_self, d_other, f);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d_self = 0; d_other = 0;
    #(3 * DLY);
    check(f == 1'b0, "reset");
    rst = 0;
    model = 1'b0;
    for (int i = 0; i < 400; i++) begin
      d_self  = 1'($urandom_range(0, 1));
      d_other = 1'($urandom_range(0, 1));
      if (!d_self) model = 1'b0;
      else if (!d_other) model = 1'b1;
      #(DLY + 5);
      check(f == model, "random step");
    end
    // lock-out: opposite rail first
    d_self = 0; d_other = 0; #(2 * DLY);
    d_other = 1; #5; d_self = 1; #(3 * DLY);
    check(f == 1'b0, "locked out by opposite rail");
    // late opposite rail does not disturb a captured rail
    d_self = 0; d_other = 0; #(2 * DLY);
    d_self = 1; #(2 * DLY); d_other = 1; #(2 * DLY);
    check(f == 1'b1, "holds when opposite rail rises late");
    // falls with guarded rail even while opposite rail high
    d_self = 0; #(DLY + 1);
    check(f == 1'b0, "falls with guarded rail");
    // exact delay
    d_other = 0; #(2 * DLY);
    d_self = 1;
    #(DLY - 1); check(f == 1'b0, "no early rise");
    #2;         check(f == 1'b1, "rise after DLY");
    // short pulse shorter than DLY is not captured
    d_self = 0; #(2 * DLY);
    d_self = 1; #(DLY - 5); d_self = 0; #(2 * DLY);
    check(f == 1'b0, "short pulse filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
