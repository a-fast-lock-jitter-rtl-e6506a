// phase_accumulator: the digital loop filter / phase accumulator.
//
// One register, PHASE_BITS + FRAC_MAX bits wide, whose top PHASE_BITS bits
// are the phase code given to the digital-to-phase converter. In fast-lock
// mode (load = 1) the register takes the TDC code (with zero fraction), so
// that continuous tracking starts from the code the TDC measured. In
// tracking mode it adds or subtracts one step per update from the
// decimator. The step is 2^(FRAC_MAX - kdpc_sel) fraction LSBs, i.e. a gain
// K_DPC of 1/2^(6 + kdpc_sel) cycle per update: kdpc_sel = 0..3 gives
// 1/2^6 .. 1/2^9 as in the design description, trading dithering jitter
// for loop bandwidth. The code wraps modulo one cycle, which gives the
// unlimited capture range of a phase rotator.
//
// This is the pair of multiplexers and the adder drawn in the block
// diagram: (TDC code | register) + (0 | +-K_DPC). Timing: one cycle from
// load/inc/dec to code.
module phase_accumulator
  import dll_pkg::*;
#(
  parameter int unsigned FRAC_MAX = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,      // fast-lock mode: take the TDC code
  input  phase_code_t           tdc_code,
  input  logic                  inc,       // one step towards larger code
  input  logic                  dec,       // one step towards smaller code
  input  logic [1:0]            kdpc_sel,  // K_DPC = 1/2^(6 + kdpc_sel)
  output phase_code_t           code
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W = PHASE_BITS + FRAC_MAX;

  logic [W-1:0] acc;
  logic [W-1:0] base, step;

  always_comb begin
    int unsigned sh;
    sh   = (int'(kdpc_sel) > int'(FRAC_MAX)) ? 0 : FRAC_MAX - int'(kdpc_sel);
    base = load ? {tdc_code, FRAC_MAX'(0)} : acc;
    if (load)                  step = '0;
    else if (inc && !dec)      step = W'(1) << sh;
    else if (dec && !inc)      step = -(W'(1) << sh);
    else                       step = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= base + step;
  end

  assign code = acc[W-1 -: PHASE_BITS];

endmodule
