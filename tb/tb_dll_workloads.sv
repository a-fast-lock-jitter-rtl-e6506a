// tb_dll_workloads: the whole DLL (fast_lock_dll, default parameters) run
// through the operating points the interface is specified for.
//   * Data rates 800 Mb/s, 900 Mb/s, 1.6 Gb/s and 3.2 Gb/s (reference 400,
//     450, 800 and 1600 MHz). At each rate the ILO is recalibrated (a rate
//     change requires it) and must end within two tuning steps plus the
//     count resolution of the reference. Then, for three supply offsets, the DLL is woken: it must
//     reach tracking exactly 3 reference cycles after enable, the first
//     replica edge must trail the reference by less than one phase step
//     (T/64 at that rate), and it must then track within two steps. At
//     1.6 GHz, that first edge within T/64 must come less than 13 ns after
//     the enable (the lock transient specified for the interface).
//   * Steady-state dither at 1.6 GHz, constant supply, for each gain
//     K_DPC = 1/64 .. 1/512: the phase code may span at most 3 adjacent
//     codes for the three finer gains. At the coarsest gain this
//     implementation's limit cycle spans 4 codes (loop latency about 1.5
//     updates), which is the bound used there.
//   * Supply sweep at 3.2 Gb/s: a triangular supply deviation of +-110 mV
//     (+-10 % of an assumed 1.1 V supply) with a 2.2 us period,
//     stepped every 5 ns, is applied
//     while tracking. Unfiltered, it would move the replica edge by
//     2 * 110 * 1.1 = 242 ps peak to peak; with the loop on, the edge must
//     stay within three steps (29 ps) of the reference, and the phase code
//     must travel over at least 20 codes to show that the loop did the
//     correcting. The sweep period is this test's own choice: only the
//     amplitude is specified for the interface.
module tb_dll_workloads;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  localparam int NRATES = 4;
  localparam real RATE_MHZ [NRATES] = '{400.0, 450.0, 800.0, 1600.0};

  real T = 625.0;
  real step_ps;

  logic              ref_clk = 1'b0, rst_n = 1'b0, dll_en = 1'b0, cal_start = 1'b0;
  logic [3:0]        lock_preset = 4'd3;
  logic [1:0]        kdpc_sel = 2'd0;
  logic signed [7:0] dv_mv = '0;
  logic              clk_dll, fb_clk, mode_switch, trk_inc, trk_dec, cal_busy, cal_done, tdc_pwr_en;
  dll_mode_e         mode;
  phase_code_t       tdc_code, phase_code;
  logic [7:0]        inj_polarity, coarse_onehot;
  logic [7:0]        tune;
  int checks = 0, failures = 0;
  int n_rates = 0, n_locks = 0;
  realtime t_ref = 0.0;
  real last_err = 1.0e9;
  real max_lock_ps = 0.0;

  fast_lock_dll dut (.*);

  always begin
    #(T / 2.0) ref_clk = ~ref_clk;
  end
  always @(posedge ref_clk) t_ref = $realtime;
  // phase error of the replica edge against the nearest reference edge
  always @(posedge fb_clk) begin
    real e;
    e = $realtime - t_ref;
    if (e > T / 2.0) e -= T;
    last_err = e;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_err(input real lo, input real hi, input string what);
    checks++;
    if (last_err < lo || last_err > hi) begin
      failures++;
      $display("FAIL %s at T=%0.1f: phase error %0.2f ps not in [%0.2f, %0.2f]",
               what, T, last_err, lo, hi);
    end
  endtask

  task automatic wake_and_track(input int dv);
    int cyc;
    realtime t_en;
    int pmin, pmax;
    dv_mv = 8'(dv);
    repeat (4) @(posedge ref_clk);
    @(negedge ref_clk) dll_en = 1'b1;
    t_en = $realtime;
    @(posedge ref_clk);
    cyc = 0;
    #1;
    while (mode != MODE_TRACK && cyc < 20) begin
      @(posedge ref_clk);
      #1;
      cyc++;
    end
    checks++;
    if (cyc != 3) begin
      failures++;
      $display("FAIL lock took %0d cycles at T=%0.1f", cyc, T);
    end else n_locks++;
    // edges still in the replica buffer were launched before injection
    #(1100.0);
    last_err = 1.0e9;
    wait (last_err < 1.0e8);
    check_err(-0.01, step_ps + 0.01, "first edge after fast lock");
    if (T < 700.0) begin
      checks++;
      if ($realtime - t_en > 13000.0) begin
        failures++;
        $display("FAIL locked edge %0.1f ps after enable", $realtime - t_en);
      end
      if ($realtime - t_en > max_lock_ps) max_lock_ps = $realtime - t_en;
    end
    $display("T=%0.1f ps dv=%0d mV: TDC code %0d, first error %0.2f ps", T, dv, tdc_code, last_err);
    pmin = 64;
    pmax = -1;
    for (int n = 0; n < 60; n++) begin
      @(posedge fb_clk);
      #1;
      check_err(-2.0 * step_ps, 2.0 * step_ps, "tracking");
      if (n >= 20) begin
        if (int'(phase_code) < pmin) pmin = int'(phase_code);
        if (int'(phase_code) > pmax) pmax = int'(phase_code);
      end
    end
    checks++;
    if (pmax - pmin > 3) begin
      failures++;
      $display("FAIL dither over codes %0d..%0d at T=%0.1f", pmin, pmax, T);
    end
  endtask

  initial begin
    int code_min, code_max;
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    for (int r = 0; r < NRATES; r++) begin
      real f_free, f_step;
      T = 1.0e6 / RATE_MHZ[r];
      step_ps = T / 64.0;
      repeat (4) @(posedge ref_clk);
      @(negedge ref_clk) cal_start = 1'b1;
      @(negedge ref_clk) cal_start = 1'b0;
      wait (cal_done);
      f_free = 400.0 * (1.0 + 3.0 * real'(tune) / 255.0);
      f_step = 1200.0 / 255.0 + RATE_MHZ[r] * 2.0 / 256.0;
      checks++;
      if (f_free < RATE_MHZ[r] - 2.0 * f_step || f_free > RATE_MHZ[r] + 2.0 * f_step) begin
        failures++;
        $display("FAIL calibration at %0.0f MHz: tune=%0d (%0.1f MHz)", RATE_MHZ[r], tune, f_free);
      end
      for (int k = 0; k < 3; k++) begin
        wake_and_track(-60 + 60 * k);
        @(negedge ref_clk) dll_en = 1'b0;
      end
      n_rates++;
    end

    // triangular supply sweep at 1.6 GHz (the last rate above)
    wake_and_track(0);
    code_min = 64;
    code_max = -1;
    for (int i = 0; i < 2 * 4 * 110; i++) begin
      // 880 steps of 5 ns: 0 -> +110 -> -110 -> 0 mV, twice
      int d;
      d = i % 440;
      if (d < 110)      dv_mv = 8'(d);
      else if (d < 330) dv_mv = 8'(220 - d);
      else              dv_mv = 8'(d - 440);
      #(5000.0);
      check_err(-3.0 * step_ps, 3.0 * step_ps, "supply sweep");
      if (int'(phase_code) < code_min) code_min = int'(phase_code);
      if (int'(phase_code) > code_max) code_max = int'(phase_code);
    end
    checks++;
    if (code_max - code_min < 20) begin
      failures++;
      $display("FAIL supply sweep moved the code only over %0d..%0d", code_min, code_max);
    end
    $display("supply sweep: phase code range %0d..%0d", code_min, code_max);
    $display("1.6 GHz: locked replica edge at most %0.1f ps after enable", max_lock_ps);

    dv_mv = '0;
    for (int k = 0; k < 4; k++) begin
      int lo, hi;
      kdpc_sel = 2'(k);
      repeat (400) @(posedge ref_clk);
      lo = 64;
      hi = -1;
      repeat (400) begin
        @(posedge ref_clk);
        if (int'(phase_code) < lo) lo = int'(phase_code);
        if (int'(phase_code) > hi) hi = int'(phase_code);
      end
      checks++;
      if (hi - lo + 1 > (k == 0 ? 4 : 3)) begin
        failures++;
        $display("FAIL K_DPC 1/%0d: dither over codes %0d..%0d", 64 << k, lo, hi);
      end
      $display("K_DPC 1/%0d: steady-state code %0d..%0d", 64 << k, lo, hi);
    end
    kdpc_sel = '0;

    checks++;
    if (n_rates != NRATES || n_locks != 3 * NRATES + 1) begin
      failures++;
      $display("FAIL rates run %0d, locks %0d", n_rates, n_locks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
