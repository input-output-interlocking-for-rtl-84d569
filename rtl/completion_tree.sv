// completion_tree: completion detector of a dual-rail word.
//
// Each bit's two rails are ORed ("this bit holds data"), and the WIDTH results
// are joined in a balanced tree of two-input C-elements. The output goes high
// once every bit holds a code word and low once every bit is back to NULL,
// and holds in between, which is what the 4-phase acknowledge needs. This is
// the usual completion detector of a WCHB stage; its structure is this
// design's choice. The tree is laid out heap-style: node i has children 2i+1
// and 2i+2, leaves are nodes WIDTH-1 .. 2*WIDTH-2, node 0 is the result.
//
// Timing (simulation): T_CD per OR gate and per C-element level.
module completion_tree
  import qdi_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DLY   = qdi_pkg::T_CD
) (
  input  logic             rst,
  input  dr_t [WIDTH-1:0]  d,
  output logic             done
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NODES = 2 * WIDTH - 1;

  logic [NODES-1:0] node;

  for (genvar b = 0; b < WIDTH; b++) begin : g_leaf
    assign #(DLY) node[WIDTH - 1 + b] = d[b].r1 || d[b].r0;
  end

  for (genvar i = 0; i < WIDTH - 1; i++) begin : g_join
    c_element #(.DLY(DLY)) u_c (
      .rst(rst),
      .a  (node[2 * i + 1]),
      .b  (node[2 * i + 2]),
      .y  (node[i])
    );
  end

  assign done = node[0];

endmodule
