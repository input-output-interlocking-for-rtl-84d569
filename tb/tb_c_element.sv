// tb_c_element: self-checking test of the two-input Muller C-element.
// Random input sequences, each held longer than the cell delay, are compared
// with a reference next-state rule (output copies agreeing inputs, else
// holds). It also checks the exact propagation delay and that a pulse shorter
// than the delay leaves the output alone.
module tb_c_element;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 20;

  logic rst, a, b, y;
  int checks = 0, failures = 0;
  logic model;

  c_element #(.DLY(DLY)) dut (.rst(rst), .a(a), .b(b), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: a=%b b=%b y=%b", what, $time, a, b, y);
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
    rst = 1; a = 0; b = 0;
    #(3 * DLY);
    check(y == 1'b0, "reset");
    rst = 0;
    model = 1'b0;
    #(2 * DLY);
    // random walk
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom_range(0, 1));
      b = 1'($urandom_range(0, 1));
      if (a == b) model = a;
      #(DLY + 5);
      check(y == model, "random step");
    end
    // exact delay: rise
    a = 0; b = 0; #(2 * DLY);
    a = 1; #(2 * DLY);
    b = 1;
    #(DLY - 1); check(y == 1'b0, "no early rise");
    #2;         check(y == 1'b1, "rise after DLY");
    // short pulse on a while b high and y high: a low for < DLY, b stays
    a = 0; b = 0; #(DLY / 2); a = 1; b = 1; #(2 * DLY);
    check(y == 1'b1, "short common low pulse filtered");
    // short pulse from 0
    a = 0; b = 0; #(2 * DLY);
    a = 1; b = 1; #(DLY / 2); a = 0; b = 0; #(2 * DLY);
    check(y == 1'b0, "short common high pulse filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
