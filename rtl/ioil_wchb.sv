// ioil_wchb: one InOutInterlock WCHB pipeline stage of WIDTH dual-rail bits.
//
// WIDTH copies of ioil_wchb_bit hold the token; a completion detector over
// their outputs produces the acknowledge for the previous stage. Like every
// WCHB (weak-conditioned half buffer), the stage latches a word when it is
// valid and the next stage is empty (ack_in low), returns to NULL when its
// input is NULL and the next stage has taken the word (ack_in high), and
// reports "full"/"empty" to the previous stage on ack_out.
//
// Interface: d/ack_out face the previous stage, q/ack_in the next one. Both
// acknowledges are active high ("the word has been taken"). WIDTH defaults to
// 8, the larger of the data widths the buffer was evaluated with (4 and 8);
// the completion detector structure and the reset are this design's choices.
//
// Timing (simulation): input to q in T_IN + T_NAND + T_OUT; q to ack_out in
// T_CD * (1 + ceil(log2 WIDTH)).
module ioil_wchb
  import qdi_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned T_IN  = qdi_pkg::T_IN_MCE,
  parameter int unsigned T_NG  = qdi_pkg::T_NAND,
  parameter int unsigned T_OUT = qdi_pkg::T_OUT_MCE,
  parameter int unsigned T_C   = qdi_pkg::T_CD
) (
  input  logic             rst,
  input  dr_t [WIDTH-1:0]  d,
  output logic             ack_out,
  output dr_t [WIDTH-1:0]  q,
  input  logic             ack_in
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar b = 0; b < WIDTH; b++) begin : g_bit
    ioil_wchb_bit #(.T_IN(T_IN), .T_NG(T_NG), .T_OUT(T_OUT)) u_bit (
      .rst(rst),
      .d  (d[b]),
      .ack(ack_in),
      .q  (q[b])
    );
  end

  completion_tree #(.WIDTH(WIDTH), .DLY(T_C)) u_cd (
    .rst (rst),
    .d   (q),
    .done(ack_out)
  );

endmodule
