// tb_tdc_frontend_model: for sampling-clock delays D across two periods of
// a 625 ps reference (50 % duty), the coarse word must hold ones exactly at
// taps m-7..m (m = floor((D mod T)/(T/16))) and, with the coarse select set
// to m, the fine word must be the thermometer of floor(4 r/(T/16)) + 1 ones
// where r is the remainder. These run with the tuning code at 255, which
// sets the stage delay to exactly T/16 (1.6 GHz). With the tuning code at
// 127 (997.6 MHz, stage delay ts = 62.65 ps) the 1->0 transition of the
// coarse word must sit at m = floor(phi/ts): the tap spacing follows the
// tuning code, not the reference. With pwr_en low both words are 0.
module tb_tdc_frontend_model;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T = 625.0;
  logic        ref_clk = 1'b0, smp_clk = 1'b0, pwr_en = 1'b0;
  logic [3:0]  coarse_sel = '0;
  logic [15:0] coarse_raw;
  logic [3:0]  fine_raw;
  logic [7:0]  tune = 8'd255;
  int checks = 0, failures = 0;
  real dly = 100.0;

  tdc_frontend_model dut (.*);

  always #(T / 2.0) ref_clk = ~ref_clk;
  always @(ref_clk) begin
    automatic logic    v  = ref_clk;
    automatic realtime dd = dly;
    fork
      begin
        #(dd);
        smp_clk = v;
      end
    join_none
  end

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge ref_clk);
    pwr_en = 1'b1;
    for (int k = 0; k < 60; k++) begin
      real phi, r;
      int m, nf;
      logic [15:0] wc;
      logic [3:0]  wf;
      dly = 20.0 + 20.5 * real'(k) + 0.3;
      phi = dly - T * $floor(dly / T);
      m = int'($floor(phi / (T / 16.0)));
      r = phi - real'(m) * T / 16.0;
      nf = int'($floor(4.0 * r / (T / 16.0))) + 1;
      coarse_sel = 4'(m);
      repeat (4) @(posedge ref_clk);
      @(posedge smp_clk);
      #1;
      wc = '0;
      for (int i = 0; i < 8; i++) wc[(m - i + 16) % 16] = 1'b1;
      wf = 4'((1 << nf) - 1);
      checks++;
      if (coarse_raw !== wc || fine_raw !== wf) begin
        failures++;
        $display("FAIL D=%0.1f coarse %b want %b fine %b want %b", dly, coarse_raw, wc,
                 fine_raw, wf);
      end
    end
    tune = 8'd127;
    for (int k = 0; k < 9; k++) begin
      real ts, phi;
      int m;
      ts  = 1.0e6 / (16.0 * (400.0 + 1200.0 * 127.0 / 255.0));
      dly = 31.0 + real'(k) * ts;   // half a stage past tap k
      phi = dly;
      m = int'($floor(phi / ts));
      repeat (4) @(posedge ref_clk);
      @(posedge smp_clk);
      #1;
      checks++;
      if (coarse_raw[m] !== 1'b1 || coarse_raw[m + 1] !== 1'b0) begin
        failures++;
        $display("FAIL mistuned line D=%0.1f: coarse %b, expected 1->0 at tap %0d", dly, coarse_raw, m);
      end
    end
    pwr_en = 1'b0;
    @(posedge smp_clk);
    #1;
    checks++;
    if (coarse_raw != '0 || fine_raw != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
