// burst_mem_if: memory side of the burst-mode interface clocking, with the
// fast-lock DLL woken by read traffic.
//
// The controller forwards a reference clock (CK) and command/address. The
// power manager decodes the commands: ACT or RD starts fast bias and then
// the DLL; the DLL locks in three reference cycles and switches to
// continuous tracking, at which point link_ready rises. The DLL output
// drives the clock distribution network whose far end is the strobe (DQS)
// and data launch clock; the DLL pre-compensates that distribution delay so
// that dqs_clk rises with ref_clk. PRE/PDE/REF/SRE switch everything off,
// so the interface draws no DLL power while idle.
//
// The DQ transmitters, receivers and equalizers of the link are analog
// circuits outside this model: clk_dll (DLL output) and dqs_clk (clock at
// the data launch flops) are brought out for them. Contains behavioural
// models (TDC front end, ILO, buffers), so it is a simulation model; its
// synthesizable parts are power_manager, dll_digital and ilo_freq_cal.
module burst_mem_if
  import dll_pkg::*;
#(
  parameter real         T_BUF_PS         = 930.0,
  parameter int unsigned FAST_BIAS_CYCLES = 4,
  parameter int unsigned TUNE_BITS        = 8,
  parameter int unsigned CAL_WIN          = 256
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  ca_cmd_e           ca_cmd,
  input  logic              cal_start,
  input  logic [3:0]        lock_preset,
  input  logic [1:0]        kdpc_sel,
  input  logic signed [7:0] dv_mv,        // supply deviation seen by the buffers
  output logic              clk_dll,
  output logic              dqs_clk,
  output logic              link_ready,
  output logic              bias_en,
  output logic              dll_en,
  output logic              wake,
  output pm_state_e         pm_state,
  output dll_mode_e         dll_mode,
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
  output logic              fb_clk,
  output logic              tdc_pwr_en
);
  timeunit 1ps;
  timeprecision 1fs;

  power_manager #(.FAST_BIAS_CYCLES(FAST_BIAS_CYCLES)) u_pm (
    .clk(ref_clk), .rst_n, .cmd(ca_cmd), .dll_tracking(dll_mode == MODE_TRACK),
    .state(pm_state), .bias_en, .dll_en, .link_ready, .wake
  );

  fast_lock_dll #(.T_BUF_PS(T_BUF_PS), .TUNE_BITS(TUNE_BITS), .CAL_WIN(CAL_WIN)) u_dll (
    .ref_clk, .rst_n, .dll_en, .cal_start, .lock_preset, .kdpc_sel, .dv_mv,
    .clk_dll, .fb_clk, .mode(dll_mode), .mode_switch, .tdc_code, .phase_code,
    .inj_polarity, .coarse_onehot, .trk_inc, .trk_dec, .tune, .cal_busy, .cal_done, .tdc_pwr_en
  );

  clk_dist_model #(.T_BUF_PS(T_BUF_PS)) u_dist (
    .clk_in(clk_dll), .dv_mv, .clk_out(dqs_clk)
  );

endmodule
