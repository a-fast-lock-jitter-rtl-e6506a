// tb_ilo_freq_cal: calibrates a test oscillator whose frequency is
// 400 MHz * (1 + 3*tune/255) against references of 0.5, 0.8, 1.0, 1.25 and
// 1.5 GHz. The chosen code must be the largest whose frequency does not
// exceed the reference by more than the count resolution (f_ref/WIN), and
// the next code up must exceed it. The run time must be 8 trials of
// WIN + SETTLE + 2 reference cycles (8 trials, default WIN = 256).
module tb_ilo_freq_cal;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int WIN = 256;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, osc = 1'b0;
  logic [7:0] tune;
  logic       busy, done;
  int checks = 0, failures = 0;
  realtime ref_half = 312.5;

  ilo_freq_cal dut (.clk, .rst_n, .start, .ilo_clk(osc), .tune, .busy, .done);

  function automatic real f_osc(input int t);
    return 400.0 * (1.0 + 3.0 * real'(t) / 255.0);
  endfunction

  always #(ref_half) clk = ~clk;
  initial forever begin
    #(1.0e6 / (2.0 * f_osc(int'(tune))));
    osc = busy ? ~osc : 1'b0;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fref [5] = '{500.0, 800.0, 1000.0, 1250.0, 1500.0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (fref[k]) begin
      int cycles;
      real tol;
      ref_half = 1.0e6 / (2.0 * fref[k]);
      repeat (4) @(posedge clk);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cycles = 1;
      while (!done && cycles < 10000) begin
        @(posedge clk);
        cycles++;
      end
      #1;
      tol = fref[k] * 2.0 / WIN;
      checks++;
      if (f_osc(int'(tune)) > fref[k] + tol || (tune != 255 && f_osc(int'(tune) + 1) < fref[k] - tol)) begin
        failures++;
        $display("FAIL fref=%0.1f tune=%0d f=%0.1f", fref[k], tune, f_osc(int'(tune)));
      end else
        $display("fref=%0.1f MHz -> tune=%0d (%0.1f MHz) in %0d cycles", fref[k], tune,
                 f_osc(int'(tune)), cycles);
      checks++;
      if (cycles < 8 * (WIN + 6) || cycles > 8 * (WIN + 6 + 3)) begin
        failures++;
        $display("FAIL calibration took %0d cycles", cycles);
      end
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
