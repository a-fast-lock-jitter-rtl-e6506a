// tb_coarse_tdc_decode: exhaustive check of the coarse thermometer decoder.
// Every circular run of 1..15 ones ending at tap m must decode to m; the
// all-zero and all-one words must be flagged invalid; a bubbled word must
// decode to its lowest 1->0 transition. Expected values are built from the
// run position, not from the decoder's rule.
module tb_coarse_tdc_decode;
  timeunit 1ps;
  timeprecision 1fs;

  logic [15:0] raw;
  logic [3:0]  code;
  logic        valid;
  int checks = 0, failures = 0;

  coarse_tdc_decode dut (.raw, .code, .valid);

  task automatic expect_code(input logic [15:0] w, input int m, input logic v);
    raw = w;
    #10;
    checks++;
    if (valid !== v || (v && code !== 4'(m))) begin
      failures++;
      $display("FAIL raw=%b code=%0d valid=%b expected %0d/%b", w, code, valid, m, v);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++)
      for (int len = 1; len < 16; len++) begin
        logic [15:0] w;
        w = '0;
        for (int k = 0; k < len; k++) w[(m - k + 16) % 16] = 1'b1;
        expect_code(w, m, 1'b1);
      end
    expect_code(16'h0000, 0, 1'b0);
    expect_code(16'hFFFF, 0, 1'b0);
    // bubble: runs ending at taps 3 and 9 -> lowest transition (3)
    expect_code(16'b0000_0011_0000_1110, 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
