// tb_dll_pkg: consistency of the shared constants and types.
// The phase code must split exactly into the coarse and fine TDC codes
// (64 = 16 coarse phases x 4 fine phases), the coarse phases must be the 16
// outputs of the 8-stage differential line, the ILO must reach the same
// 1/64-cycle step with 8 stages, 2 polarities and WEIGHT_MAX weight levels,
// and the weight field must hold 0..WEIGHT_MAX. The enums must be distinct
// and fit their widths, and the command set must contain the wake-up
// (ACT, RD) and power-down (PRE, PDE, REF, SRE) commands as distinct codes.
module tb_dll_pkg;
  timeunit 1ps;
  timeprecision 1fs;
  import dll_pkg::*;

  int checks = 0, failures = 0;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase_code_t pc;
    expect_eq(int'(PHASE_BITS), int'(COARSE_BITS + FINE_BITS), "phase bits = coarse + fine");
    expect_eq(int'(1 << COARSE_BITS), int'(COARSE_TAPS), "coarse code covers the coarse taps");
    expect_eq(int'(1 << FINE_BITS), int'(FINE_TAPS), "fine code covers the fine taps");
    expect_eq(int'(1 << PHASE_BITS), int'(64), "64 phase steps per cycle");
    expect_eq(int'(COARSE_TAPS), int'(2 * 8), "16 coarse phases from 8 differential stages");
    expect_eq(int'(2 * ILO_STAGES * WEIGHT_MAX), int'(1 << PHASE_BITS), "ILO step equals TDC step");
    expect_eq(int'(WEIGHT_MAX), int'(FINE_TAPS), "weight levels match the fine code");
    expect_eq(int'(WEIGHT_BITS), int'($clog2(WEIGHT_MAX + 1)), "weight field width");
    expect_eq(int'($bits(pc)), int'(PHASE_BITS), "phase_code_t width");
    pc = '1;
    expect_eq(int'(pc), int'(63), "phase_code_t holds 63");
    expect_eq(int'($bits(dll_mode_e)), int'(2), "dll_mode_e width");
    expect_eq(int'(MODE_OFF == MODE_FAST_LOCK || MODE_FAST_LOCK == MODE_TRACK || MODE_OFF == MODE_TRACK), int'(0), "distinct DLL modes");
    expect_eq(int'(MODE_OFF), int'(0), "reset mode is OFF");
    expect_eq(int'($bits(ca_cmd_e)), int'(3), "ca_cmd_e width");
    begin
      ca_cmd_e c;
      int n;
      bit [7:0] seen;
      seen = '0;
      n = 0;
      c = c.first();
      do begin
        seen[int'(c)] = 1'b1;
        n++;
        c = c.next();
      end while (c != c.first());
      expect_eq(int'(n), int'(8), "eight commands");
      expect_eq(int'(int'(seen)), int'(8'hFF), "commands distinct");
    end
    expect_eq(int'(CMD_NOP), int'(0), "NOP is code 0");
    expect_eq(int'($bits(pm_state_e)), int'(3), "pm_state_e width");
    expect_eq(int'(PM_IDLE), int'(0), "reset power state is IDLE");
    expect_eq(int'(PM_FAST_BIAS != PM_FAST_LOCK && PM_FAST_LOCK != PM_READY && PM_IDLE != PM_READY), int'(1),
              "distinct power states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
