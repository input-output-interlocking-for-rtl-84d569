// in_filter_mce: asymmetric input C-element of the input filter (one rail).
//
// One such cell sits on each rail of a dual-rail input. Its normal input is the
// rail it guards (d_self); its positive ("+") input is the complement of the
// opposite rail (d_other), taken straight from the input wire without a gate
// in between. The output rises only when d_self is high while d_other is low,
// and falls as soon as d_self is low; d_other has no say in the falling edge.
// So the first rail to go high blocks the other rail's cell at once: a late
// transition on the opposite rail, correct or faulty, is never captured.
//
// The cell's propagation delay DLY (ps) is also the threshold of the glitch
// filter that follows: a pulse on d_self shorter than DLY never reaches f, so
// the NAND behind it never sees both of its inputs high. The delay is inertial
// in simulation and ignored by synthesis. The loop through f is the cell's
// keeper (see c_element). Reset (active high, clears f) is this design's
// addition.
module in_filter_mce #(
  parameter int unsigned DLY = qdi_pkg::T_IN_MCE
) (
  input  logic rst,
  input  logic d_self,   // normal input: the guarded rail
  input  logic d_other,  // opposite rail, used inverted on the "+" input
  output logic f
);
  timeunit 1ps;
  timeprecision 1ps;

  logic f_next;

  // set: d_self & ~d_other ; reset: ~d_self ; otherwise hold
  always_comb f_next = !rst && ((d_self && !d_other) || (f && d_self));

  assign #(DLY) f = f_next;

endmodule
