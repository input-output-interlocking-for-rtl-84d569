// ioil_wchb_bit: one dual-rail bit of the InOutInterlock WCHB buffer.
//
// Each rail passes three checks on its way into the stage:
//   1. input filter  - an asymmetric C-element (in_filter_mce) lets a rising
//      rail through only while the opposite input rail is low, so the first
//      rail to rise locks the other one out with no gate delay in between;
//   2. glitch filter - a NAND of the raw rail and the input C-element output.
//      Its output n goes low only while both are high, so a pulse shorter
//      than the input C-element delay is swallowed, and a faulty pulse that
//      did get through is withdrawn ("flushed") as soon as the raw rail drops,
//      without waiting for the input C-element to fall;
//   3. output interlock - the storage C-element (out_interlock_mce) of one rail
//      cannot rise while the other rail's output is high.
// The NAND inverts the data, so the acknowledge from the next stage enters the
// storage C-elements without an inverter.
//
// Interface: d is the dual-rail input from the previous stage, ack is the
// acknowledge from the next stage (high = next stage holds our token), q is
// the stored dual-rail output. The structure follows the described buffer;
// gate delays and the reset are this design's choices.
//
// Timing (simulation): forward latency input rail -> q rail is
// T_IN + T_NAND + T_OUT when ack is low.
module ioil_wchb_bit
  import qdi_pkg::*;
#(
  parameter int unsigned T_IN  = qdi_pkg::T_IN_MCE,
  parameter int unsigned T_NG  = qdi_pkg::T_NAND,
  parameter int unsigned T_OUT = qdi_pkg::T_OUT_MCE
) (
  input  logic rst,
  input  dr_t  d,
  input  logic ack,
  output dr_t  q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic f0, f1;  // input filter outputs
  logic n0, n1;  // glitch filter outputs (active low)
  logic q0, q1;

  // Input filter: mutual lock-out on the raw rails.
  in_filter_mce #(.DLY(T_IN)) u_if0 (.rst(rst), .d_self(d.r0), .d_other(d.r1), .f(f0));
  in_filter_mce #(.DLY(T_IN)) u_if1 (.rst(rst), .d_self(d.r1), .d_other(d.r0), .f(f1));

  // Glitch filter NANDs: raw rail AND filtered rail, inverted.
  assign #(T_NG) n0 = !(d.r0 && f0);
  assign #(T_NG) n1 = !(d.r1 && f1);

  // Storage with output interlock.
  out_interlock_mce #(.DLY(T_OUT)) u_oc0 (.rst(rst), .n(n0), .ack(ack), .q_other(q1), .q(q0));
  out_interlock_mce #(.DLY(T_OUT)) u_oc1 (.rst(rst), .n(n1), .ack(ack), .q_other(q0), .q(q1));

  assign q = '{r1: q1, r0: q0};

endmodule
