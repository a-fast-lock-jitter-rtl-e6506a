// tb_phase_accumulator: random loads, steps and gain settings against an
// integer model of a 9-bit wrapping accumulator whose step is
// 2^(3 - kdpc_sel) fraction LSBs; the code is the top 6 bits. Also checks
// the wrap at both ends (the unlimited phase range) and that one full
// cycle of steps at K_DPC = 1/2^9 takes 512 updates.
module tb_phase_accumulator;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0, inc = 1'b0, dec = 1'b0;
  phase_code_t tdc_code = '0, code;
  logic [1:0]  kdpc_sel = '0;
  int checks = 0, failures = 0;
  int model = 0;
  int wraps = 0;

  phase_accumulator dut (.clk, .rst_n, .load, .tdc_code, .inc, .dec, .kdpc_sel, .code);

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic l, input phase_code_t t, input logic i, input logic d,
                      input logic [1:0] k);
    int prev;
    @(negedge clk);
    load = l; tdc_code = t; inc = i; dec = d; kdpc_sel = k;
    prev = model;
    if (l) model = int'(t) * 8;
    else if (i && !d) model = (model + (8 >> k)) % 512;
    else if (d && !i) model = (model - (8 >> k) + 512) % 512;
    if (!l && ((prev > 448 && model < 64) || (prev < 64 && model > 448))) wraps++;
    @(posedge clk);
    #1;
    checks++;
    if (code !== phase_code_t'(model / 8)) begin
      failures++;
      $display("FAIL code=%0d expected %0d", code, model / 8);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(0, 19);
      step(r == 0, phase_code_t'($urandom), r > 1 && r < 11, r >= 9, 2'($urandom));
    end
    // walk up from 62 across the wrap at the coarsest gain, then back down
    step(1'b1, 6'd62, 1'b0, 1'b0, 2'd0);
    for (int n = 0; n < 4; n++) step(1'b0, '0, 1'b1, 1'b0, 2'd0);
    for (int n = 0; n < 8; n++) step(1'b0, '0, 1'b0, 1'b1, 2'd0);
    // one full cycle at the finest gain is 512 updates
    step(1'b1, 6'd10, 1'b0, 1'b0, 2'd3);
    for (int n = 0; n < 512; n++) step(1'b0, '0, 1'b1, 1'b0, 2'd3);
    checks++;
    if (code !== 6'd10) failures++;
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL no wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
