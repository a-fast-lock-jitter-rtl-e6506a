// tb_burst_mem_if: end-to-end run of the memory-side interface clocking at
// its default parameters (1.6 GHz reference, 930 ps clock distribution).
// Sequence and what is checked:
//   1. ILO frequency calibration against the reference.
//   2. ACT wakes the interface: 4 cycles of fast bias, DLL enabled, fast
//      lock for exactly 3 reference cycles, mode switch, TDC powered down,
//      link_ready. The DQS clock at the end of the distribution must then
//      rise within one phase step (T/64) after CK, and stay within two
//      steps while tracking.
//   3. Supply drops 20 mV (22 ps more buffer delay): the tracking loop must
//      raise the code across the 180-degree polarity boundary (31 -> 32)
//      and re-align DQS; the supply returns and the code comes back down.
//   4. PRE powers everything down: DQS stops.
//   5. With a 60/40 duty-cycle reference, RD wakes the interface again;
//      DQS must be aligned and have a 50 % duty cycle.
//   6. At K_DPC = 1/512 a 10 mV drift is tracked in finer steps.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_burst_mem_if;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  localparam real T = 625.0;
  localparam real STEP = T / 64.0;

  logic              ref_clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  ca_cmd_e           ca_cmd = CMD_NOP;
  logic [3:0]        lock_preset = 4'd3;
  logic [1:0]        kdpc_sel = 2'd0;
  logic signed [7:0] dv_mv = '0;
  logic              clk_dll, dqs_clk, link_ready, bias_en, dll_en, wake, mode_switch;
  logic              trk_inc, trk_dec, cal_done, cal_busy, fb_clk, tdc_pwr_en;
  pm_state_e         pm_state;
  dll_mode_e         dll_mode;
  phase_code_t       tdc_code, phase_code;
  logic [7:0]        inj_polarity, coarse_onehot;
  logic [7:0]        tune;

  int checks = 0, failures = 0;
  real duty = 0.5;
  realtime t_ref = 0.0, t_dqs_rise = 0.0;
  real last_err = 1.0e9, last_high = 0.0;
  int  dqs_edges = 0;

  // mechanism counters
  int n_cal = 0, n_wake_act = 0, n_wake_rd = 0, n_fast_bias = 0, n_fast_lock = 0;
  int n_switch = 0, n_tdc_off = 0, n_inc = 0, n_dec = 0, n_cross_up = 0, n_cross_dn = 0;
  int n_powerdown = 0, n_dcd = 0, n_fine_gain = 0;

  burst_mem_if dut (.*);

  initial forever begin
    ref_clk = 1'b1;
    #(T * duty);
    ref_clk = 1'b0;
    #(T * (1.0 - duty));
  end

  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge dqs_clk) begin
    real e;
    e = $realtime - t_ref;
    if (e > T / 2.0) e -= T;
    last_err = e;
    t_dqs_rise = $realtime;
    dqs_edges++;
  end
  always @(negedge dqs_clk) last_high = $realtime - t_dqs_rise;

  always @(posedge ref_clk) begin
    static int prev = -1;
    if (trk_inc) n_inc++;
    if (trk_dec) n_dec++;
    if (mode_switch) n_switch++;
    if (dll_mode == MODE_TRACK) begin
      if (prev == 31 && phase_code == 6'd32) n_cross_up++;
      if (prev == 32 && phase_code == 6'd31) n_cross_dn++;
      prev = int'(phase_code);
    end else prev = -1;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0.1f ps)", what, $realtime);
    end
  endtask

  task automatic cmd(input ca_cmd_e c);
    @(negedge ref_clk) ca_cmd = c;
    @(negedge ref_clk) ca_cmd = CMD_NOP;
  endtask

  task automatic check_aligned(input int edges, input real lo, input real hi, input string what);
    repeat (edges) begin
      @(posedge dqs_clk);
      #1;
      check(last_err >= lo && last_err <= hi, $sformatf("%s: DQS error %0.2f ps", what, last_err));
    end
  endtask

  // wake with `c`, follow the power/lock sequence, check timing and phase
  task automatic wake_and_lock(input ca_cmd_e c);
    int bias, lock;
    cmd(c);
    check(bias_en && !dll_en, "fast bias after trigger");
    if (c == CMD_ACT) n_wake_act++; else n_wake_rd++;
    bias = 0;
    while (!dll_en && bias < 20) begin
      @(posedge ref_clk);
      #1;
      bias++;
    end
    check(bias == 4, $sformatf("fast bias lasted %0d cycles", bias));
    n_fast_bias++;
    @(posedge ref_clk);  // DLL enable sampled
    #1;
    lock = 0;
    while (dll_mode != MODE_TRACK && lock < 20) begin
      check(dll_mode == MODE_FAST_LOCK && !link_ready, "fast-lock mode, link not ready");
      @(posedge ref_clk);
      #1;
      lock++;
    end
    check(lock == 3, $sformatf("fast lock took %0d cycles", lock));
    n_fast_lock++;
    @(posedge ref_clk);
    #1;
    check(link_ready, "link ready after lock");
    check(!tdc_pwr_en, "TDC powered down in tracking");
    if (!tdc_pwr_en) n_tdc_off++;
    // edges still inside the buffers left the ILO before injection
    #(2.0 * 1100.0);
    last_err = 1.0e9;
    wait (last_err < 1.0e8);
    #1;
    check(last_err >= -0.01 && last_err <= STEP + 0.01,
          $sformatf("first DQS edge after lock: error %0.2f ps", last_err));
    $display("locked: TDC code %0d, DQS error %0.2f ps", tdc_code, last_err);
  endtask

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    // 1. calibration
    @(negedge ref_clk) cal_start = 1'b1;
    @(negedge ref_clk) cal_start = 1'b0;
    wait (cal_done);
    check(400.0 * (1.0 + 3.0 * real'(tune) / 255.0) > 1600.0 - 2.0 * 1200.0 / 255.0 - 12.5,
          $sformatf("calibrated tune %0d", tune));
    n_cal++;
    // idle: no DQS clock once the buffers have emptied
    repeat (4) @(posedge ref_clk);
    dqs_edges = 0;
    repeat (20) @(posedge ref_clk);
    check(dqs_edges == 0 && !bias_en, "idle: no clock, no bias");
    // 2. wake-up on ACT
    wake_and_lock(CMD_ACT);
    check_aligned(200, -2.0 * STEP, 2.0 * STEP, "tracking");
    // 3. supply drop: code crosses 31 -> 32
    dv_mv = -8'sd20;
    repeat (200) @(posedge ref_clk);
    check_aligned(100, -2.0 * STEP, 2.0 * STEP, "after supply drop");
    check(phase_code >= 6'd32, $sformatf("code %0d after supply drop", phase_code));
    dv_mv = 8'sd0;
    repeat (200) @(posedge ref_clk);
    check_aligned(100, -2.0 * STEP, 2.0 * STEP, "after supply recovery");
    // 4. power down
    cmd(CMD_PRE);
    check(!bias_en && !dll_en && !link_ready, "PRE powers down");
    repeat (4) @(posedge ref_clk);
    dqs_edges = 0;
    repeat (20) @(posedge ref_clk);
    check(dqs_edges == 0, "no DQS clock while powered down");
    if (dqs_edges == 0) n_powerdown++;
    // 5. 60/40 reference duty cycle, wake-up on RD
    duty = 0.6;
    repeat (10) @(posedge ref_clk);
    wake_and_lock(CMD_RD);
    repeat (50) begin
      @(negedge dqs_clk);
      #1;
      check(last_high > T / 2.0 - 0.5 && last_high < T / 2.0 + 0.5,
            $sformatf("DQS high time %0.2f ps with 60/40 input", last_high));
    end
    n_dcd++;
    check_aligned(100, -2.0 * STEP, 2.0 * STEP, "tracking with 60/40 input");
    // 6. finest loop gain
    kdpc_sel = 2'd3;
    dv_mv = -8'sd10;
    repeat (1500) @(posedge ref_clk);
    check_aligned(100, -2.0 * STEP, 2.0 * STEP, "K_DPC = 1/512 after 10 mV drift");
    n_fine_gain++;
    cmd(CMD_PDE);
    check(!bias_en, "power-down entry");

    $display("mechanisms: cal=%0d wake_act=%0d wake_rd=%0d fast_bias=%0d fast_lock=%0d switch=%0d",
             n_cal, n_wake_act, n_wake_rd, n_fast_bias, n_fast_lock, n_switch);
    $display("            tdc_off=%0d inc=%0d dec=%0d cross_up=%0d cross_dn=%0d powerdown=%0d dcd=%0d fine_gain=%0d",
             n_tdc_off, n_inc, n_dec, n_cross_up, n_cross_dn, n_powerdown, n_dcd, n_fine_gain);
    check(n_cal > 0, "calibration happened");
    check(n_wake_act > 0 && n_wake_rd > 0, "wake on ACT and on RD happened");
    check(n_fast_bias > 0 && n_fast_lock > 0 && n_switch > 0, "fast bias, fast lock, mode switch happened");
    check(n_tdc_off > 0, "TDC power-down happened");
    check(n_inc > 0 && n_dec > 0, "tracking steps both ways happened");
    check(n_cross_up > 0 && n_cross_dn > 0, "180-degree polarity crossing both ways happened");
    check(n_powerdown > 0 && n_dcd > 0 && n_fine_gain > 0, "power-down, DCD run, fine gain happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
