// out_interlock_mce: output (storage) C-element of one rail, with interlock.
//
// The cell has two normal inputs and one negative ("-") input and an inverting
// output stage. The normal inputs are the active-low data n from the glitch
// filter NAND and the acknowledge ack from the next stage; the negative input
// is the opposite rail's buffered output q_other.
//   q rises  when n = 0 (data present), ack = 0 (next stage empty) and
//            q_other = 0 (the other rail has not fired): the output interlock.
//   q falls  when n = 1 (input back to NULL) and ack = 1 (next stage has the
//            token).
// Otherwise q holds. Because the NAND already inverts the data, ack is used
// uninverted, which is the usual WCHB condition "data and not ack" written in
// the inverted domain.
//
// DLY (ps) is the inertial delay of the cell in simulation; synthesis ignores
// it. The loop through q is the cell's keeper. Reset (active high, clears q,
// i.e. the stage starts empty) is this design's addition.
module out_interlock_mce #(
  parameter int unsigned DLY = qdi_pkg::T_OUT_MCE
) (
  input  logic rst,
  input  logic n,        // active-low data from the NAND glitch filter
  input  logic ack,      // acknowledge from the next stage (high = taken)
  input  logic q_other,  // opposite rail output, the "-" input
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q_next;

  always_comb
    q_next = !rst && ((!n && !ack && !q_other) || (q && !(n && ack)));

  assign #(DLY) q = q_next;

endmodule
