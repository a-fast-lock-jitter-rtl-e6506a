// tb_injection_ctrl: for all 64 phase codes checks that exactly the two
// adjacent stages s, s+1 are enabled, that their weights sum to 4 and,
// decoding the phase the injected pair produces (stage j with polarity p
// sits at 4*j + 32*p steps, the pair interpolates between its two stages),
// that the code is reproduced. For every +-1 step, including the 180 and
// 360 degree crossings, no stage enabled both before and after may change
// polarity (glitch-less rotation).
module tb_injection_ctrl;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  phase_code_t code = '0;
  logic [7:0]  inj_en, polarity, coarse_onehot;
  logic [7:0][2:0] weight;
  int checks = 0, failures = 0;
  int boundary_steps = 0;

  injection_ctrl dut (.clk, .rst_n, .en, .code, .inj_en, .weight, .polarity, .coarse_onehot);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase (in 1/64 cycle) of the injected pair, found from the outputs only
  function automatic int phase_of(input logic [7:0] e, input logic [7:0][2:0] w,
                                  input logic [7:0] p);
    int lo;
    int ph_lo, ph_hi;
    lo = -1;
    for (int j = 0; j < 8; j++) if (e[j] && e[(j + 1) % 8]) lo = j;
    if (lo < 0) return -1;
    ph_lo = (4 * lo + 32 * int'(p[lo])) % 64;
    ph_hi = (4 * ((lo + 1) % 8) + 32 * int'(p[(lo + 1) % 8])) % 64;
    // the upper stage must sit one coarse step (4) after the lower one
    if (((ph_hi - ph_lo + 64) % 64) != 4) return -2;
    if (int'(w[lo]) + int'(w[(lo + 1) % 8]) != 4) return -3;
    return (ph_lo + int'(w[(lo + 1) % 8])) % 64;
  endfunction

  task automatic apply(input int c, output logic [7:0] e, output logic [7:0] p);
    @(negedge clk);
    code = phase_code_t'(c);
    @(posedge clk);
    #1;
    e = inj_en;
    p = polarity;
    checks++;
    if ($countones(inj_en) != 2 || phase_of(inj_en, weight, polarity) != c ||
        coarse_onehot != (8'd1 << ((c / 4 + 1) % 8))) begin
      failures++;
      $display("FAIL code=%0d en=%b pol=%b decoded=%0d", c, inj_en, polarity,
               phase_of(inj_en, weight, polarity));
    end
  endtask

  initial begin
    logic [7:0] e0, p0, e1, p1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int c = 0; c < 64; c++) begin
      for (int d = -1; d <= 1; d += 2) begin
        int c1;
        c1 = (c + d + 64) % 64;
        apply(c, e0, p0);
        apply(c1, e1, p1);
        checks++;
        if (((e0 & e1) & (p0 ^ p1)) != 0) begin
          failures++;
          $display("FAIL polarity glitch %0d -> %0d: en %b/%b pol %b/%b", c, c1, e0, e1, p0, p1);
        end
        if ((c == 31 && c1 == 32) || (c == 63 && c1 == 0) || (c == 32 && c1 == 31) ||
            (c == 0 && c1 == 63))
          boundary_steps++;
      end
    end
    checks++;
    if (boundary_steps != 4) failures++;
    // injection off: no stage enabled
    @(negedge clk);
    en = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (inj_en != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
