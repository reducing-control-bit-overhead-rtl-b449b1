// Shared constants and types of the hybrid X-masking / X-canceling compactor.
//
// The defaults follow the evaluated configuration: a 32-stage MISR that
// delivers 7 X-free combinations per halt, fed over 32 tester channels. The
// chain count and chain length are this design's choice: 32 chains of 15783
// cells hold 505,056 cells, enough for a 505,050-cell circuit.
package xh_pkg;

  localparam int unsigned DEF_N_CHAINS  = 32;
  localparam int unsigned DEF_CHAIN_LEN = 15783;
  localparam int unsigned DEF_M         = 32;
  localparam int unsigned DEF_Q         = 7;
  localparam int unsigned DEF_CHANNELS  = 32;
  // Stage i (bit i-1) receives the feedback of stage 1 when its bit is set.
  // x^32 + x^22 + x^2 + x + 1 (an assumed polynomial).
  localparam logic [DEF_M-1:0] DEF_FB_TAPS = 32'hE000_0200;

  // Controller phases.
  typedef enum logic [1:0] {
    ST_IDLE,    // waiting for a tester command
    ST_LOAD,    // writing the current partition's mask columns
    ST_SHIFT,   // unloading one pattern through masking gates into the MISR
    ST_CANCEL   // scan halted, emitting Q X-free combinations
  } ctrl_state_e;

endpackage
