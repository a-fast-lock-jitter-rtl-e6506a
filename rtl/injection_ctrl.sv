// injection_ctrl: phase code to ILO injector controls, with glitch-less
// polarity selection.
//
// The digital-to-phase converter is an 8-stage ring oscillator whose last
// stage inverts; a reference injector drives each stage through an enable,
// a weight and its own polarity select. Stage j injected with polarity p
// shifts the output by j*22.5 + p*180 degrees, so 8 stages x 2 polarities
// give 16 coarse positions; injecting two adjacent stages with weights
// (4-f, f) interpolates 4 fine steps between them. A 6-bit phase code
// c = {h, s[2:0], f[1:0]} (64 steps of 5.625 degrees) therefore drives:
//   enable : stages s and s+1 (mod 8), the two active injectors
//   weight : 4-f on stage s, f on stage s+1, 0 elsewhere
//   polarity: h on every stage, except where the pair reaches across the
//            ring's inverting wrap. Stage 0 takes ~h while the pair is
//            (6,7) or (7,0) and stage 7 takes ~h while the pair is (0,1)
//            or (1,2).
// Each of these two exceptions is applied one position before the stage
// becomes active. A step of +-1 code therefore never changes the polarity
// of a stage that is active before and after the step, also across the
// 180 and 360 degree boundaries where h flips. This is the predictive
// per-stage polarity update the design describes. The one-cycle lead on
// each side and the encoding of weights as 0..4 per stage are this
// design's choices. coarse_onehot[k] = 1 means injectors k-1 and k are
// enabled, as in the description.
//
// Timing: all outputs are registered together, one cycle after code.
module injection_ctrl
  import dll_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 en,          // injection on
  input  phase_code_t                          code,
  output logic [ILO_STAGES-1:0]                inj_en,
  output logic [ILO_STAGES-1:0][WEIGHT_BITS-1:0] weight,
  output logic [ILO_STAGES-1:0]                polarity,
  output logic [ILO_STAGES-1:0]                coarse_onehot
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [ILO_STAGES-1:0]                  en_d, pol_d, coarse_d;
  logic [ILO_STAGES-1:0][WEIGHT_BITS-1:0] w_d;

  always_comb begin
    logic       h;
    logic [2:0] s, s1;
    logic [1:0] f;
    h  = code[5];
    s  = code[4:2];
    f  = code[1:0];
    s1 = s + 3'd1;
    en_d     = '0;
    w_d      = '0;
    coarse_d = '0;
    if (en) begin
      en_d[s]      = 1'b1;
      en_d[s1]     = 1'b1;
      w_d[s]       = WEIGHT_BITS'(WEIGHT_MAX) - WEIGHT_BITS'(f);
      w_d[s1]      = WEIGHT_BITS'(f);
      coarse_d[s1] = 1'b1;
    end
    pol_d    = {ILO_STAGES{h}};
    pol_d[0] = h ^ (s >= 3'd6);
    pol_d[7] = h ^ (s <= 3'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_en        <= '0;
      weight        <= '0;
      polarity      <= '0;
      coarse_onehot <= '0;
    end else begin
      inj_en        <= en_d;
      weight        <= w_d;
      polarity      <= pol_d;
      coarse_onehot <= coarse_d;
    end
  end

endmodule
