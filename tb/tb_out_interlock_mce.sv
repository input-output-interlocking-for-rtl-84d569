// tb_out_interlock_mce: self-checking test of the output storage C-element.
// Reference rule: q rises when the active-low data n is low, ack is low and
// the opposite output is low; q falls when n and ack are both high; otherwise
// q holds. Random steps plus directed interlock and delay cases.
module tb_out_interlock_mce;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 30;

  logic rst, n, ack, q_other, q;
  int checks = 0, failures = 0;
  logic model;

  out_interlock_mce #(.DLY(DLY)) dut (.rst(rst), .n(n), .ack(ack), .q_other(q_other), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: n=%b ack=%b q_other=%b q=%b", what, $time, n, ack, q_other, q);
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
    rst = 1; n = 1; ack = 0; q_other = 0;
    #(3 * DLY);
    check(q == 1'b0, "reset");
    rst = 0;
    model = 1'b0;
    for (int i = 0; i < 500; i++) begin
      n       = 1'($urandom_range(0, 1));
      ack     = 1'($urandom_range(0, 1));
      q_other = 1'($urandom_range(0, 1));
      if (!n && !ack && !q_other) model = 1'b1;
      else if (n && ack) model = 1'b0;
      #(DLY + 5);
      check(q == model, "random step");
    end
    // interlock: opposite output high blocks the rise
    n = 1; ack = 1; q_other = 0; #(2 * DLY);
    check(q == 1'b0, "cleared");
    ack = 0; q_other = 1; #5; n = 0; #(3 * DLY);
    check(q == 1'b0, "interlocked by opposite output");
    // opposite output rising later does not clear a stored rail
    q_other = 0; #(2 * DLY);
    check(q == 1'b1, "rises once opposite output is low");
    q_other = 1; #(2 * DLY);
    check(q == 1'b1, "holds when opposite output rises later");
    // ack high alone does not clear while data still present
    q_other = 0; ack = 1; #(2 * DLY);
    check(q == 1'b1, "holds while data present and ack high");
    // data NULL but ack low: hold
    ack = 0; n = 1; #(2 * DLY);
    check(q == 1'b1, "holds while ack low");
    // exact fall delay
    ack = 1;
    #(DLY - 1); check(q == 1'b1, "no early fall");
    #2;         check(q == 1'b0, "fall after DLY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
