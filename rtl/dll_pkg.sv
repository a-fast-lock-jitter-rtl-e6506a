// dll_pkg: constants and types shared by the fast-lock DLL and its link.
//
// The DLL resolves one reference period into 64 phase steps (a 6-bit phase
// code): a 4-bit coarse TDC code (16 phases of an 8-stage differential delay
// line) concatenated with a 2-bit fine code (4 blended phases). The ILO used
// as digital-to-phase converter has 8 stages; two adjacent stages are
// injected with complementary weights to reach the same 1/64-cycle step.
// The command encoding of the CA decoder is this design's own choice.
package dll_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned PHASE_BITS  = 6;   // 64 phase codes per cycle
  localparam int unsigned COARSE_BITS = 4;   // coarse TDC binary code
  localparam int unsigned FINE_BITS   = 2;   // fine TDC binary code
  localparam int unsigned COARSE_TAPS = 16;  // 8 differential stages
  localparam int unsigned FINE_TAPS   = 4;   // blended phases
  localparam int unsigned ILO_STAGES  = 8;   // ring oscillator stages
  localparam int unsigned WEIGHT_MAX  = 4;   // injection weight levels per pair
  localparam int unsigned WEIGHT_BITS = 3;   // holds 0..WEIGHT_MAX

  typedef logic [PHASE_BITS-1:0] phase_code_t;

  // Operating mode of the DLL: off, open-loop fast lock, closed-loop tracking.
  typedef enum logic [1:0] {
    MODE_OFF       = 2'd0,
    MODE_FAST_LOCK = 2'd1,
    MODE_TRACK     = 2'd2
  } dll_mode_e;

  // Command/address bus commands seen by the memory-side power manager.
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,   // activate
    CMD_RD  = 3'd2,   // read
    CMD_WR  = 3'd3,   // write
    CMD_PRE = 3'd4,   // precharge
    CMD_PDE = 3'd5,   // power-down entry
    CMD_REF = 3'd6,   // refresh
    CMD_SRE = 3'd7    // self-refresh entry
  } ca_cmd_e;

  // Power/lock sequence of the memory interface.
  typedef enum logic [2:0] {
    PM_IDLE      = 3'd0,
    PM_FAST_BIAS = 3'd1,
    PM_FAST_LOCK = 3'd2,
    PM_READY     = 3'd3
  } pm_state_e;

endpackage
