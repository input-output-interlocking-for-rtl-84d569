// c_element: symmetric two-input Muller C-element with reset.
//
// The output copies the inputs when both agree and keeps its value while they
// differ. It is written as its gate equation y = ab + y(a+b) through a delayed
// continuous assignment, so the loop through y is the C-element's keeper and is
// intentional: synthesis tools report it as a combinational loop, which is what
// a C-element is when built from standard gates. The delay DLY (ps) is inertial
// in simulation: an input pulse shorter than DLY does not move the output.
// Synthesis ignores it. Reset is active high and clears the output; it is this
// design's addition, the cell itself follows the standard C-element.
module c_element #(
  parameter int unsigned DLY = qdi_pkg::T_CD
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  logic y_next;

  always_comb y_next = !rst && ((a && b) || (y && (a || b)));

  assign #(DLY) y = y_next;

endmodule
