// ioil_pipeline: a linear QDI pipeline (FIFO) of InOutInterlock WCHB stages.
//
// STAGES buffer stages of WIDTH dual-rail bits are chained: stage i's output
// and acknowledge feed stage i+1's input and stage i's ack_in. Every stage
// stores a word with the input filter, glitch filter and output interlock of
// ioil_wchb_bit, so an illegal (1,1) code word or a short glitch on any rail
// is stopped at the first stage it reaches instead of travelling downstream.
// Being WCHB half buffers, N stages hold at most ceil(N/2) distinct tokens at
// once (a token and a NULL spacer take one stage each).
//
// Interface: in_data/in_ack face the data source (4-phase, active-high
// acknowledge), out_data/out_ack the sink. rst (active high) empties every
// stage; hold the inputs at NULL while it is asserted. The stage count is not
// given by the described design (it evaluates the buffer inside pipelined
// arithmetic circuits); 4 is this design's default. Delays and widths as in
// ioil_wchb.
module ioil_pipeline
  import qdi_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned T_IN   = qdi_pkg::T_IN_MCE,
  parameter int unsigned T_NG   = qdi_pkg::T_NAND,
  parameter int unsigned T_OUT  = qdi_pkg::T_OUT_MCE,
  parameter int unsigned T_C    = qdi_pkg::T_CD
) (
  input  logic             rst,
  input  dr_t [WIDTH-1:0]  in_data,
  output logic             in_ack,
  output dr_t [WIDTH-1:0]  out_data,
  input  logic             out_ack
);
  timeunit 1ps;
  timeprecision 1ps;

  dr_t [WIDTH-1:0] data [STAGES+1];
  logic            ack  [STAGES+1];

  assign data[0]      = in_data;
  assign in_ack       = ack[0];
  assign out_data     = data[STAGES];
  assign ack[STAGES]  = out_ack;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    ioil_wchb #(
      .WIDTH(WIDTH), .T_IN(T_IN), .T_NG(T_NG), .T_OUT(T_OUT), .T_C(T_C)
    ) u_stage (
      .rst    (rst),
      .d      (data[s]),
      .ack_out(ack[s]),
      .q      (data[s+1]),
      .ack_in (ack[s+1])
    );
  end

endmodule
