// tb_fast_lock_dll: the whole DLL (digital core with TDC, ILO and replica
// models) at a 1.6 GHz reference and a 930 ps replica delay.
//   * ILO calibration ends with the free-running frequency within two
//     tuning steps of the reference.
//   * For 8 supply offsets (each a different buffer delay, hence phase
//     code) the DLL is switched on; it must reach tracking exactly 3
//     reference cycles after en is sampled, and the first replica edge
//     launched after lock must trail the reference edge by less than one
//     phase step (T/64 = 9.77 ps).
//   * In tracking the replica edge must stay within two steps of the
//     reference, and after a 20 mV supply step (22 ps) the loop must bring
//     it back within two steps.
module tb_fast_lock_dll;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  localparam real T = 625.0;
  localparam real STEP = T / 64.0;

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
  realtime t_ref = 0.0;
  real last_err = 1.0e9;

  fast_lock_dll dut (.*);

  always #(T / 2.0) ref_clk = ~ref_clk;
  always @(posedge ref_clk) t_ref = $realtime;
  // phase error of the replica edge against the nearest reference edge
  always @(posedge fb_clk) begin
    real e;
    e = $realtime - t_ref;
    if (e > T / 2.0) e -= T;
    last_err = e;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_err(input real lo, input real hi, input string what);
    checks++;
    if (last_err < lo || last_err > hi) begin
      failures++;
      $display("FAIL %s: phase error %0.2f ps not in [%0.2f, %0.2f]", what, last_err, lo, hi);
    end
  endtask

  initial begin
    repeat (3) @(posedge ref_clk);
    rst_n = 1'b1;
    @(negedge ref_clk) cal_start = 1'b1;
    @(negedge ref_clk) cal_start = 1'b0;
    wait (cal_done);
    checks++;
    if (400.0 * (1.0 + 3.0 * real'(tune) / 255.0) < 1600.0 - 2.0 * 1200.0 / 255.0 - 12.5) begin
      failures++;
      $display("FAIL calibration tune=%0d", tune);
    end
    for (int k = 0; k < 8; k++) begin
      int cyc;
      dv_mv = 8'(-60 + 17 * k);
      repeat (4) @(posedge ref_clk);
      @(negedge ref_clk) dll_en = 1'b1;
      @(posedge ref_clk);
      cyc = 0;
      #1;
      while (mode != MODE_TRACK && cyc < 20) begin
        @(posedge ref_clk);
        #1;
        cyc++;
      end
      checks++;
      if (cyc != 3) begin failures++; $display("FAIL lock took %0d cycles", cyc); end
      // edges already in the replica buffer left the free-running ILO
      // before injection started; skip them
      #(1100.0);
      last_err = 1.0e9;
      wait (last_err < 1.0e8);
      check_err(-0.01, STEP + 0.01, "first edge after fast lock");
      checks++;
      if (tdc_pwr_en) begin failures++; $display("FAIL TDC powered in tracking"); end
      $display("dv=%0d mV: TDC code %0d, first error %0.2f ps", dv_mv, tdc_code, last_err);
      repeat (120) begin
        @(posedge fb_clk);
        #1;
        check_err(-2.0 * STEP, 2.0 * STEP, "tracking");
      end
      dv_mv = dv_mv - 8'sd20;
      repeat (150) @(posedge ref_clk);
      repeat (40) begin
        @(posedge fb_clk);
        #1;
        check_err(-2.0 * STEP, 2.0 * STEP, "after 20 mV step");
      end
      @(negedge ref_clk) dll_en = 1'b0;
      repeat (4) @(posedge ref_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
