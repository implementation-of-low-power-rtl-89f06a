// trc_pkg: types and constants shared by the test data decompressor.
//
// The tri-state detector turns each TDI symbol into a 2-bit code. The code
// assignment below (0 -> 00, 1 -> 11, Hi-Z -> 01) is this design's choice:
// the detector drives code[1] and code[0] from two sensing stages, which
// agree for a driven level and disagree for a floating one. The CGU states
// are this design's own.
package trc_pkg;
  typedef logic [1:0] code_t;

  localparam code_t CODE_ZERO = 2'b00;
  localparam code_t CODE_ONE  = 2'b11;
  localparam code_t CODE_HIZ  = 2'b01;

  // CGU states: LOAD takes ATE symbols, CMD waits for the mode bit that
  // follows a Hi-Z symbol, EXPAND shifts the R-TRC into the scan chain on
  // the internal clock.
  typedef enum logic [1:0] {
    ST_LOAD   = 2'd0,
    ST_CMD    = 2'd1,
    ST_EXPAND = 2'd2
  } cgu_state_e;

  // Expansion modes chosen by the bit after a Hi-Z symbol.
  typedef enum logic {
    MODE_FEEDBACK = 1'b0,
    MODE_TWIST    = 1'b1
  } trc_mode_e;
endpackage
