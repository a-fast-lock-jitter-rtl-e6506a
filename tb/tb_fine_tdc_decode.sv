// tb_fine_tdc_decode: all 16 fine TDC words. The expected code is the
// number of leading ones (from bit 0) minus one, floored at zero.
module tb_fine_tdc_decode;
  timeunit 1ps;
  timeprecision 1fs;

  logic [3:0] raw;
  logic [1:0] code;
  int checks = 0, failures = 0;

  fine_tdc_decode dut (.raw, .code);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 16; w++) begin
      int lead, exp_code;
      raw = 4'(w);
      #10;
      lead = 0;
      while (lead < 4 && w[lead]) lead++;
      exp_code = (lead == 0) ? 0 : lead - 1;
      checks++;
      if (code !== 2'(exp_code)) begin
        failures++;
        $display("FAIL raw=%b code=%0d expected %0d", raw, code, exp_code);
      end
    end
    // the four clean thermometer words of the design
    raw = 4'b0001; #10; checks++; if (code !== 2'd0) failures++;
    raw = 4'b0011; #10; checks++; if (code !== 2'd1) failures++;
    raw = 4'b0111; #10; checks++; if (code !== 2'd2) failures++;
    raw = 4'b1111; #10; checks++; if (code !== 2'd3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
