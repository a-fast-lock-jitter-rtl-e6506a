// tb_mode_counter: for presets 1..6 (and 0), counts the cycles spent in
// fast-lock mode after en rises and checks the single switch pulse; en
// falling returns the mode to OFF at the next edge.
module tb_mode_counter;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [3:0] preset = 4'd3;
  dll_mode_e  mode;
  logic       switch_pulse;
  int checks = 0, failures = 0;

  mode_counter dut (.clk, .rst_n, .en, .preset, .mode, .switch_pulse);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p <= 6; p++) begin
      int fl, pulses, expect_fl;
      @(negedge clk);
      preset = 4'(p);
      en = 1'b1;
      fl = 0;
      pulses = 0;
      for (int c = 0; c < 12; c++) begin
        @(posedge clk);
        #1;
        if (mode == MODE_FAST_LOCK) fl++;
        if (switch_pulse) begin
          pulses++;
          checks++;
          if (mode != MODE_TRACK) failures++;
        end
      end
      expect_fl = (p == 0) ? 1 : p;
      checks++;
      if (fl != expect_fl || pulses != 1 || mode != MODE_TRACK) begin
        failures++;
        $display("FAIL preset=%0d fast-lock cycles=%0d pulses=%0d", p, fl, pulses);
      end
      @(negedge clk);
      en = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (mode != MODE_OFF) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
