// tb_dll_digital: the digital core against an idealized TDC front end.
// For a buffer delay of p/64 of a reference period, the testbench builds
// the samplers' words itself (tap i of the coarse line holds
// ref(t - i/16 T), fine tap j holds ref(t - sel/16 T - j/64 T)) and
// checks, for 24 random delays:
//   * fast lock: the injectors carry floor(p) exactly 3 cycles after en is
//     sampled, the mode switches then and the TDC is powered down;
//   * tracking: a constantly early feedback lowers the code by one step per
//     4 decisions (K_D = 1/4) at K_DPC = 1/64, a late one raises it, and at
//     K_DPC = 1/512 eight updates make one code step; codes wrap at 0/63.
// The phase reached by the injectors is decoded from their enables,
// weights and polarities.
module tb_dll_digital;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, fb_clk = 1'b0;
  logic [3:0]  lock_preset = 4'd3;
  logic [1:0]  kdpc_sel = 2'd0;
  logic [15:0] coarse_raw = '0;
  logic [3:0]  fine_raw = '0;
  logic        tdc_pwr_en, mode_switch, trk_inc, trk_dec;
  logic [3:0]  coarse_sel;
  logic [7:0]  inj_en, inj_polarity, coarse_onehot;
  logic [7:0][2:0] inj_weight;
  dll_mode_e   mode;
  phase_code_t tdc_code, phase_code;
  int checks = 0, failures = 0;
  real p = 0.0;
  int n_wrap = 0, n_lock = 0, n_up = 0, n_down = 0;

  dll_digital dut (.*);

  always #312.5 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic samp(input real x);
    real f;
    f = x / 64.0;
    f = f - $floor(f);
    return f < 0.5;
  endfunction

  // idealized front end: refreshed every half cycle, powered by tdc_pwr_en
  always @(negedge clk) begin
    for (int i = 0; i < 16; i++) coarse_raw[i] <= tdc_pwr_en && samp(p - 4.0 * i);
    for (int j = 0; j < 4; j++)
      fine_raw[j] <= tdc_pwr_en && samp(p - 4.0 * real'(coarse_sel) - real'(j));
  end

  function automatic int injected_phase();
    for (int s = 0; s < 8; s++)
      if (inj_en[s] && inj_en[(s + 1) % 8])
        return (32 * int'(inj_polarity[s]) + 4 * s + int'(inj_weight[(s + 1) % 8])) % 64;
    return -1;
  endfunction

  // Loop monitor: an independent accumulator model fed by the update
  // pulses; the DUT code must follow it one cycle later and the injectors
  // one cycle after that. Pulse direction must match the feedback level
  // once the detector pipeline has flushed (6 cycles).
  int  model = 0;
  int  since_fb = 0;
  int  prev_code = -1;
  bit  mon_on = 0;
  int  pending = 0;
  always @(posedge clk) begin
    #1;
    if (mon_on && mode == MODE_TRACK) begin
      // the update issued at the previous edge is applied with the gain
      // the accumulator saw at this edge
      model = (model + pending * (8 >> kdpc_sel) + 512) % 512;
      pending = 0;
      checks++;
      if (phase_code != phase_code_t'(model / 8) || (prev_code >= 0 && injected_phase() != prev_code)) begin
        failures++;
        $display("FAIL tracking: code %0d injected %0d, expected %0d/%0d", phase_code,
                 injected_phase(), model / 8, prev_code);
      end
      prev_code = int'(phase_code);
      if (trk_inc || trk_dec) begin
        if (since_fb > 6) begin
          checks++;
          if ((fb_clk && !trk_dec) || (!fb_clk && !trk_inc)) failures++;
        end
        pending = trk_dec ? -1 : 1;
      end
    end
    since_fb++;
  end

  task automatic track(input logic fb, input int updates, input logic [1:0] k);
    int seen, start;
    @(negedge clk);
    start = model / 8;
    fb_clk = fb;
    kdpc_sel = k;
    since_fb = 0;
    seen = 0;
    while (seen < updates) begin
      @(posedge clk);
      #2;
      if (trk_inc || trk_dec) seen++;
    end
    if (fb) n_down++; else n_up++;
    if ((fb && model / 8 > start) || (!fb && model / 8 < start)) n_wrap++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 24; t++) begin
      int cyc, want;
      p = (t < 2) ? ((t == 0) ? 62.3 : 1.7) : real'($urandom_range(0, 6399)) / 100.0;
      want = int'($floor(p));
      @(negedge clk);
      en = 1'b1;
      @(posedge clk);  // en sampled here
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (injected_phase() < 0 && cyc < 20);
      checks++;
      if (cyc != 3 || injected_phase() != want || mode != MODE_TRACK || int'(tdc_code) != want) begin
        failures++;
        $display("FAIL lock p=%0.2f: %0d cycles, injected %0d, tdc %0d, want %0d", p, cyc,
                 injected_phase(), tdc_code, want);
      end else n_lock++;
      checks++;
      if (tdc_pwr_en) begin failures++; $display("FAIL TDC still powered"); end
      model = want * 8;
      pending = 0;
      prev_code = want;
      mon_on = 1;
      track(1'b1, 5, 2'd0);
      track(1'b0, 9, 2'd0);
      track(1'b1, 16, 2'd3);
      @(negedge clk);
      mon_on = 0;
      en = 1'b0;
      @(posedge clk);
      #1;
      @(posedge clk);
      #1;
      checks++;
      if (mode != MODE_OFF || inj_en != '0) failures++;
    end
    checks++;
    if (n_wrap == 0 || n_lock != 24 || n_up == 0 || n_down == 0) begin
      failures++;
      $display("FAIL coverage wrap=%0d lock=%0d", n_wrap, n_lock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
