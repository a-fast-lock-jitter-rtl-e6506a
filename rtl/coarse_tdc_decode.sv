// coarse_tdc_decode: coarse TDC thermometer-to-binary converter.
//
// The coarse TDC samples the reference clock with the 16 outputs of an
// 8-stage differential delay line (taps spaced T_REF/16) at the edge of the
// replica-delayed reference. Tap i holds ref(t - i*dT), so the captured word
// is a circular run of ones that ends at the tap whose delayed edge has just
// passed: raw[m] = 1 and raw[m+1 mod 16] = 0. The 4-bit code is that m. The
// same code drives the multiplexer that hands the two phases bracketing the
// reference edge (taps m and m+1) to the phase blender of the fine step.
//
// Purely combinational. If the word holds several 1->0 transitions (a
// sampler bubble) the lowest index wins; a word with no transition (all
// ones or all zeros, a clock that is not toggling) gives code 0 and
// valid = 0. The bubble rule and the invalid flag are this design's choice;
// the 16-bit width and 4-bit output follow the design description.
module coarse_tdc_decode
  import dll_pkg::*;
(
  input  logic [COARSE_TAPS-1:0] raw,      // sampled delay-line taps
  output logic [COARSE_BITS-1:0] code,     // index of the last tap that saw ref high
  output logic                   valid     // a 1->0 transition was found
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [COARSE_TAPS-1:0] edge_at;

  always_comb begin
    for (int i = 0; i < COARSE_TAPS; i++)
      edge_at[i] = raw[i] & ~raw[(i + 1) % COARSE_TAPS];
  end

  always_comb begin
    code  = '0;
    valid = 1'b0;
    for (int i = COARSE_TAPS - 1; i >= 0; i--) begin
      if (edge_at[i]) begin
        code  = COARSE_BITS'(i);
        valid = 1'b1;
      end
    end
  end

endmodule
