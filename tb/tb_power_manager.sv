// tb_power_manager: wake-up on ACT and on RD, no wake-up on WR/NOP, fast
// bias lasting FAST_BIAS_CYCLES = 4 cycles before the DLL is enabled,
// link_ready only after the DLL reports tracking, and power-down on PRE,
// PDE, REF and SRE from every active state.
module tb_power_manager;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, dll_tracking = 1'b0;
  ca_cmd_e   cmd = CMD_NOP;
  pm_state_e state;
  logic      bias_en, dll_en, link_ready, wake;
  int checks = 0, failures = 0;

  power_manager dut (.clk, .rst_n, .cmd, .dll_tracking, .state, .bias_en, .dll_en,
                     .link_ready, .wake);

  always #312.5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(input ca_cmd_e c);
    @(negedge clk);
    cmd = c;
    @(posedge clk);
    #1;
    cmd = CMD_NOP;
  endtask

  task automatic check(input logic b, input logic d, input logic r, input string what);
    checks++;
    if (bias_en !== b || dll_en !== d || link_ready !== r) begin
      failures++;
      $display("FAIL %s: bias=%b dll=%b ready=%b", what, bias_en, dll_en, link_ready);
    end
  endtask

  // wake with `trig`, verify the sequence, then sleep with `off`
  task automatic wake_cycle(input ca_cmd_e trig, input ca_cmd_e off);
    int bias_cycles;
    tick(trig);
    check(1, 0, 0, "fast bias entered");
    checks++;
    if (!wake) failures++;
    bias_cycles = 1;
    while (!dll_en && bias_cycles < 20) begin
      tick(CMD_NOP);
      if (!dll_en) bias_cycles++;
    end
    checks++;
    if (bias_cycles != 4) begin
      failures++;
      $display("FAIL fast bias lasted %0d cycles", bias_cycles);
    end
    check(1, 1, 0, "fast lock");
    tick(CMD_NOP);
    check(1, 1, 0, "still locking");
    @(negedge clk) dll_tracking = 1'b1;
    tick(CMD_NOP);
    check(1, 1, 1, "ready");
    tick(CMD_WR);
    check(1, 1, 1, "write keeps ready");
    tick(off);
    dll_tracking = 1'b0;
    check(0, 0, 0, "powered down");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    tick(CMD_NOP);
    check(0, 0, 0, "idle after reset");
    tick(CMD_WR);
    check(0, 0, 0, "write does not wake");
    wake_cycle(CMD_ACT, CMD_PRE);
    wake_cycle(CMD_RD, CMD_PDE);
    wake_cycle(CMD_ACT, CMD_REF);
    wake_cycle(CMD_RD, CMD_SRE);
    // sleep during fast bias
    tick(CMD_RD);
    check(1, 0, 0, "bias");
    tick(CMD_PRE);
    check(0, 0, 0, "abort in fast bias");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
