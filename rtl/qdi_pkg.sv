// qdi_pkg: shared types and constants for the dual-rail QDI buffer cells.
//
// A data bit travels on two rails (x.0, x.1). Logic HI is (x.0,x.1) = (0,1),
// LO is (1,0), the spacer NULL is (0,0) and (1,1) is an illegal code word that
// the buffer is designed never to store. Tokens follow the 4-phase
// return-to-zero protocol: a valid word, then an acknowledge, then NULL, then
// the acknowledge released.
//
// The default gate delays below are this design's own choice (picoseconds);
// they only matter for timing simulation, where the input C-element delay sets
// the width of the shortest input pulse that can get through the glitch filter.
package qdi_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // One dual-rail bit. r1 carries HI, r0 carries LO.
  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  localparam dr_t DR_NULL    = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_LO      = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_HI      = '{r1: 1'b1, r0: 1'b0};
  localparam dr_t DR_ILLEGAL = '{r1: 1'b1, r0: 1'b1};

  typedef enum logic [1:0] {
    CODE_NULL    = 2'd0,
    CODE_VALID   = 2'd1,
    CODE_ILLEGAL = 2'd2
  } code_e;

  // Default propagation delays in ps.
  localparam int unsigned T_IN_MCE  = 30;  // input filter C-element
  localparam int unsigned T_NAND    = 10;  // glitch-filter NAND
  localparam int unsigned T_OUT_MCE = 30;  // output (storage) C-element
  localparam int unsigned T_CD      = 20;  // one completion-detector gate

  function automatic dr_t dr_encode(input logic v);
    return v ? DR_HI : DR_LO;
  endfunction

  function automatic code_e dr_classify(input dr_t x);
    if (x == DR_NULL) return CODE_NULL;
    if (x == DR_ILLEGAL) return CODE_ILLEGAL;
    return CODE_VALID;
  endfunction

  // Value carried by a valid code word.
  function automatic logic dr_value(input dr_t x);
    return x.r1;
  endfunction

endpackage
