// tb_clk_dist_model: the buffer model delays both clock edges by
// 930 ps - 1.1 ps/mV * dv for supply deviations of 0, +20 and -30 mV.
module tb_clk_dist_model;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, out;
  logic signed [7:0] dv = '0;
  int checks = 0, failures = 0;
  realtime rise_t [$], fall_t [$];

  // the input edge closest to `want` before now must be exactly want ago
  task automatic check_delay(ref realtime q [$], input real want, input string what);
    real best;
    best = 1.0e9;
    foreach (q[i])
      if ($realtime - q[i] > 0.0 && ($realtime - q[i] - want) ** 2 < (best - want) ** 2)
        best = $realtime - q[i];
    checks++;
    if (best < want - 0.01 || best > want + 0.01) begin
      failures++;
      $display("FAIL %s delay %0.3f want %0.3f", what, best, want);
    end
  endtask

  clk_dist_model dut (.clk_in(clk), .dv_mv(dv), .clk_out(out));

  always #312.5 clk = ~clk;
  always @(posedge clk) rise_t.push_back($realtime);
  always @(negedge clk) fall_t.push_back($realtime);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dvs [3] = '{0, 20, -30};
    foreach (dvs[k]) begin
      real want;
      dv = 8'(dvs[k]);
      want = 930.0 - 1.1 * real'(dvs[k]);
      repeat (4) @(posedge clk);
      repeat (3) begin
        @(posedge out);
        check_delay(rise_t, want, "rise");
        @(negedge out);
        check_delay(fall_t, want, "fall");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
