// Shared constants and types of the Carry Barrel Adder (CBA).
//
// CBA_WIDTH is the operand width of the main configuration (a 16-bit adder);
// CBA_WIDTH_WIDE is the wider 106-bit configuration that was timed at
// 151.03 MHz. The controller state type is this design's own choice.
package cba_pkg;

  localparam int unsigned CBA_WIDTH      = 16;
  localparam int unsigned CBA_WIDTH_WIDE = 106;

  // Controller state: IDLE waits for start, RUN iterates the half-adder ring
  // until the carry word is zero.
  typedef enum logic {
    CBA_IDLE = 1'b0,
    CBA_RUN  = 1'b1
  } cba_state_e;

endpackage
