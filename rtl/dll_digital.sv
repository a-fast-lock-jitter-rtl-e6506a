// dll_digital: the synthesized digital core of the fast-lock DLL.
//
// It ties the two loops of the hybrid DLL to one shared digital-to-phase
// converter (the ILO and its injectors):
//   * Fast lock (open loop). The coarse TDC word is decoded and registered
//     (cycle 1); its code selects the two delay-line phases that the phase
//     blender interpolates, and the fine TDC word is decoded and registered
//     (cycle 2); the code {coarse, fine} is then held and drives the
//     injectors directly (cycle 3). Because the ILO is injected at a
//     variable point and tapped at a fixed output, code n gives a delay of
//     T_REF - n*T_REF/64, the complement of the measured buffer delay,
//     without any subtraction.
//   * Continuous tracking (closed loop). After `lock_preset` cycles
//     (default 3) the mode counter switches over. The phase accumulator,
//     loaded with the TDC code during fast lock, is then moved by +-K_DPC
//     per decimated bang-bang decision. The TDC is powered down
//     (tdc_pwr_en = 0).
// The output multiplexer gives the TDC code to the injectors in fast lock
// and the accumulator code in tracking; both equal the TDC code at the
// switch, so the switch is glitch-less.
//
// The block structure (TDC code combine, counter, two input muxes and adder
// of the accumulator, output mode mux, !!PD, /D, K_DPC) follows the
// design's block diagram. The injector enable being held off until the TDC
// code is valid is this design's choice.
//
// Clock: the reference clock. The TDC sampler outputs are taken as stable
// for a full reference cycle after each sample.
module dll_digital
  import dll_pkg::*;
#(
  parameter int unsigned FRAC_MAX = 3,   // K_DPC down to 1/2^(6+FRAC_MAX)
  parameter int unsigned DECIM    = 4,   // K_D = 1/DECIM
  parameter int unsigned CNT_BITS = 4
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   en,           // DLL on
  input  logic [CNT_BITS-1:0]                    lock_preset,  // fast-lock cycles
  input  logic [1:0]                             kdpc_sel,
  // TDC front end
  input  logic [COARSE_TAPS-1:0]                 coarse_raw,
  input  logic [FINE_TAPS-1:0]                   fine_raw,
  output logic                                   tdc_pwr_en,
  output logic [COARSE_BITS-1:0]                 coarse_sel,   // phase mux select
  // tracking loop feedback
  input  logic                                   fb_clk,       // replica output
  // injector controls
  output logic [ILO_STAGES-1:0]                  inj_en,
  output logic [ILO_STAGES-1:0][WEIGHT_BITS-1:0] inj_weight,
  output logic [ILO_STAGES-1:0]                  inj_polarity,
  output logic [ILO_STAGES-1:0]                  coarse_onehot,
  // status
  output dll_mode_e                              mode,
  output logic                                   mode_switch,
  output phase_code_t                            tdc_code,
  output phase_code_t                            phase_code,   // code sent to the injectors
  output logic                                   trk_inc,
  output logic                                   trk_dec
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [COARSE_BITS-1:0] coarse_dec, coarse_q, coarse_q2;
  logic                   coarse_valid;
  logic [FINE_BITS-1:0]   fine_dec, fine_q;
  logic [1:0]             fl_cnt;
  logic                   tdc_valid;
  logic                   pd_early, pd_valid;
  phase_code_t            acc_code;
  logic                   fast_lock;

  mode_counter #(.CNT_BITS(CNT_BITS)) u_cnt (
    .clk, .rst_n, .en, .preset(lock_preset), .mode, .switch_pulse(mode_switch)
  );

  assign fast_lock  = (mode == MODE_FAST_LOCK);
  assign tdc_pwr_en = fast_lock;

  coarse_tdc_decode u_coarse (
    .raw(coarse_raw), .code(coarse_dec), .valid(coarse_valid)
  );
  fine_tdc_decode u_fine (.raw(fine_raw), .code(fine_dec));

  // Two-step conversion: coarse, then fine with the coarse phases selected.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coarse_q  <= '0;
      coarse_q2 <= '0;
      fine_q    <= '0;
      fl_cnt    <= '0;
    end else if (fast_lock) begin
      if (coarse_valid) coarse_q <= coarse_dec;
      coarse_q2 <= coarse_q;
      fine_q    <= fine_dec;
      if (fl_cnt != 2'd3) fl_cnt <= fl_cnt + 1'b1;
    end else begin
      fl_cnt <= '0;
    end
  end

  assign coarse_sel = coarse_q;
  assign tdc_code   = {coarse_q2, fine_q};
  assign tdc_valid  = (fl_cnt >= 2'd2);

  bbpd u_pd (
    .clk, .rst_n, .en(mode == MODE_TRACK), .fb_clk, .early(pd_early), .valid(pd_valid)
  );

  decimator #(.DECIM(DECIM)) u_dec (
    .clk, .rst_n, .valid(pd_valid), .early(pd_early), .inc(trk_inc), .dec(trk_dec)
  );

  phase_accumulator #(.FRAC_MAX(FRAC_MAX)) u_acc (
    .clk, .rst_n, .load(fast_lock), .tdc_code, .inc(trk_inc), .dec(trk_dec),
    .kdpc_sel, .code(acc_code)
  );

  assign phase_code = fast_lock ? tdc_code : acc_code;

  injection_ctrl u_inj (
    .clk, .rst_n,
    .en((fast_lock && tdc_valid) || mode == MODE_TRACK),
    .code(phase_code),
    .inj_en, .weight(inj_weight), .polarity(inj_polarity), .coarse_onehot
  );

endmodule
