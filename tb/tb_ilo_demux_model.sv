// tb_ilo_demux_model: with the injectors set for phase code c (pair s,
// s+1, weights 4-f and f, polarity h, stage 0 inverted when s = 7), the
// locked output must rise T - c T/64 after each reference rise and stay
// high T/2, for a 60/40 reference duty cycle too. With injection off it
// must free-run at 400 MHz * (1 + 3 tune/255).
module tb_ilo_demux_model;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T = 625.0;
  logic       ref_clk = 1'b0, osc_en = 1'b0, clk_out;
  logic [7:0] tune = '0;
  logic [7:0] inj_en = '0, polarity = '0;
  logic [7:0][2:0] weight = '0;
  int checks = 0, failures = 0;
  real duty = 0.5;
  realtime t_ref;

  ilo_demux_model dut (.*);

  initial forever begin
    ref_clk = 1'b1;
    #(T * duty);
    ref_clk = 1'b0;
    #(T * (1.0 - duty));
  end
  always @(posedge ref_clk) t_ref = $realtime;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_code(input int c);
    int s, f;
    logic h;
    s = (c / 4) % 8;
    f = c % 4;
    h = (c >= 32);
    inj_en = '0;
    weight = '0;
    inj_en[s] = 1'b1;
    inj_en[(s + 1) % 8] = 1'b1;
    weight[s] = 3'(4 - f);
    weight[(s + 1) % 8] = 3'(f);
    polarity = {8{h}};
    if (s == 7) polarity[0] = ~h;
  endtask

  initial begin
    osc_en = 1'b1;
    for (int k = 0; k < 2; k++) begin
      duty = (k == 0) ? 0.5 : 0.6;
      for (int c = 0; c < 64; c += 3) begin
        realtime d, hi, t_r;
        real want;
        set_code(c);
        repeat (4) @(posedge ref_clk);
        @(posedge clk_out);
        t_r = $realtime;
        d = t_r - t_ref;
        if (d <= 0.001) d += T;
        want = T - real'(c) * T / 64.0;
        @(negedge clk_out);
        hi = $realtime - t_r;
        checks++;
        if (d < want - 0.01 || d > want + 0.01 || hi < T / 2.0 - 0.01 || hi > T / 2.0 + 0.01) begin
          failures++;
          $display("FAIL code %0d duty %0.1f: delay %0.3f want %0.3f, high %0.3f", c, duty, d,
                   want, hi);
        end
      end
    end
    inj_en = '0;
    for (int t = 0; t < 256; t += 37) begin
      realtime t0;
      real want;
      tune = 8'(t);
      repeat (3) @(posedge clk_out);
      t0 = $realtime;
      repeat (4) @(posedge clk_out);
      want = 1.0e6 / (400.0 * (1.0 + 3.0 * real'(t) / 255.0));
      checks++;
      if (($realtime - t0) / 4.0 < want - 0.05 || ($realtime - t0) / 4.0 > want + 0.05) begin
        failures++;
        $display("FAIL tune %0d period %0.3f want %0.3f", t, ($realtime - t0) / 4.0, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
