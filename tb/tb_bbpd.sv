// tb_bbpd: the bang-bang detector samples the feedback level at each
// reference rising edge and reports it two edges later; valid follows en.
module tb_bbpd;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, fb_clk = 1'b0;
  logic early, valid;
  int checks = 0, failures = 0;
  logic hist [$];

  bbpd dut (.clk, .rst_n, .en, .fb_clk, .early, .valid);

  always #312.5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #100 en = 1'b1;
    for (int i = 0; i < 200; i++) begin
      // feedback edge placed randomly before or after the coming ref edge
      #($urandom_range(50, 500));
      fb_clk = $urandom_range(0, 1) == 1;
      @(posedge clk);
      hist.push_back(fb_clk);
      #1;
      if (hist.size() >= 3) begin
        checks++;
        if (early !== hist[hist.size() - 2] || valid !== 1'b1) begin
          failures++;
          $display("FAIL cycle %0d early=%b expected %b valid=%b", i, early,
                   hist[hist.size() - 2], valid);
        end
      end
    end
    en = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (valid !== 1'b0) begin failures++; $display("FAIL valid stays high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
