// fast_lock_dll: the complete hybrid fast-lock DLL (synthesizable digital
// core plus behavioural models of its analog parts).
//
// Data flow (the design's top-level block diagram):
//   ref_clk -> replica clock distribution -> TDC samplers (coarse, fine)
//   ref_clk -> TDC delay line -> coarse_raw / fine_raw -> dll_digital
//   dll_digital -> injector enables/weights/polarities -> ILO -> clk_dll
//   clk_dll -> replica clock distribution -> fb_clk -> bang-bang detector
// On dll_en the DLL locks open-loop in lock_preset reference cycles
// (default 3) using the TDC code, then tracks voltage and temperature
// drift with the bang-bang loop while the TDC is powered down. cal_start
// runs the ILO free-running frequency calibration with the DLL off; its
// tuning code also sets the stage delay of the TDC delay line, which is
// built from the same cells, so the calibration fixes the TDC resolution.
//
// Of the instances, dll_digital and ilo_freq_cal are synthesizable; the
// TDC front end, the ILO and the replica buffers are behavioural models,
// which makes this wrapper a simulation model too. dv_mv (supply deviation)
// only feeds the replica buffer models.
module fast_lock_dll
  import dll_pkg::*;
#(
  parameter real         T_BUF_PS  = 930.0,  // replica / distribution delay
  parameter int unsigned TUNE_BITS = 8,
  parameter int unsigned CAL_WIN   = 256
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic              dll_en,
  input  logic              cal_start,
  input  logic [3:0]        lock_preset,
  input  logic [1:0]        kdpc_sel,
  input  logic signed [7:0] dv_mv,
  output logic              clk_dll,      // ILO output, into the clock distribution
  output logic              fb_clk,       // replica output seen by the detector
  output dll_mode_e         mode,
  output logic              mode_switch,
  output phase_code_t       tdc_code,
  output phase_code_t       phase_code,
  output logic [7:0]        inj_polarity,
  output logic [7:0]        coarse_onehot,
  output logic              trk_inc,
  output logic              trk_dec,
  output logic [TUNE_BITS-1:0] tune,
  output logic              cal_busy,
  output logic              cal_done,
  output logic              tdc_pwr_en    // TDC front end powered (fast lock only)
);
  timeunit 1ps;
  timeprecision 1fs;

  logic        smp_clk;
  logic [3:0]  coarse_sel;
  logic [15:0] coarse_raw;
  logic [3:0]  fine_raw;
  logic [7:0]  inj_en;
  logic [7:0][2:0] inj_weight;

  clk_dist_model #(.T_BUF_PS(T_BUF_PS)) u_rep_tdc (
    .clk_in(ref_clk), .dv_mv, .clk_out(smp_clk)
  );

  tdc_frontend_model #(.TUNE_BITS(TUNE_BITS)) u_tdc_fe (
    .ref_clk, .smp_clk, .pwr_en(tdc_pwr_en), .coarse_sel, .tune, .coarse_raw, .fine_raw
  );

  dll_digital u_dig (
    .clk(ref_clk), .rst_n, .en(dll_en), .lock_preset, .kdpc_sel,
    .coarse_raw, .fine_raw, .tdc_pwr_en, .coarse_sel, .fb_clk,
    .inj_en, .inj_weight, .inj_polarity, .coarse_onehot,
    .mode, .mode_switch, .tdc_code, .phase_code, .trk_inc, .trk_dec
  );

  ilo_freq_cal #(.TUNE_BITS(TUNE_BITS), .WIN(CAL_WIN)) u_cal (
    .clk(ref_clk), .rst_n, .start(cal_start), .ilo_clk(clk_dll),
    .tune, .busy(cal_busy), .done(cal_done)
  );

  ilo_demux_model #(.TUNE_BITS(TUNE_BITS)) u_ilo (
    .ref_clk, .osc_en(dll_en || cal_busy), .tune,
    .inj_en, .weight(inj_weight), .polarity(inj_polarity), .clk_out(clk_dll)
  );

  clk_dist_model #(.T_BUF_PS(T_BUF_PS)) u_rep_fb (
    .clk_in(clk_dll), .dv_mv, .clk_out(fb_clk)
  );

endmodule
