// tb_decimator: random decision streams with random gaps. Every DECIM = 4
// valid decisions must produce dec when early wins, inc when late wins and
// nothing on a 2-2 tie, one cycle after the fourth decision.
module tb_decimator;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, early = 1'b0;
  logic inc, dec;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_tie = 0;

  decimator dut (.clk, .rst_n, .valid, .early, .inc, .dec);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int votes, nv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    votes = 0;
    nv    = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 3) != 0);
      early = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      #1;
      // outputs now reflect the window closed at this edge (if any)
      if (valid) begin
        votes += early ? 1 : -1;
        nv++;
      end
      if (nv == 4) begin
        checks++;
        if ((votes > 0 && !(dec && !inc)) || (votes < 0 && !(inc && !dec)) ||
            (votes == 0 && (inc || dec))) begin
          failures++;
          $display("FAIL votes=%0d inc=%b dec=%b", votes, inc, dec);
        end
        if (votes > 0) n_dec++; else if (votes < 0) n_inc++; else n_tie++;
        votes = 0;
        nv    = 0;
      end else begin
        checks++;
        if (inc || dec) begin
          failures++;
          $display("FAIL update outside window end");
        end
      end
    end
    checks++;
    if (n_inc == 0 || n_dec == 0 || n_tie == 0) failures++;
    $display("windows: inc=%0d dec=%0d tie=%0d", n_inc, n_dec, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
