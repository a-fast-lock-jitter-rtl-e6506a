// power_manager: CA decoder and power sequencer of the burst-mode interface.
//
// The DLL on the memory side is kept fully off (no bias current) except
// around reads. An activate (ACT, when TRIG_ON_ACT = 1) or a read (RD)
// command wakes it: the fast-bias circuit first settles the analog bias
// voltages (FAST_BIAS_CYCLES reference cycles, about 2 ns), then the DLL is
// enabled and locks in fast-lock mode; when it reports continuous tracking
// the link is declared ready to launch read data. A precharge, power-down,
// refresh or self-refresh command turns everything off again.
//
//   IDLE --ACT/RD--> FAST_BIAS --count--> FAST_LOCK --dll_tracking--> READY
//   any state --PRE/PDE/REF/SRE--> IDLE
//
// The trigger commands, the 2 ns bias settling time and the idle/fast
// bias/fast lock/tracking sequence follow the design description. The
// command encoding (dll_pkg::ca_cmd_e), the cycle count and the exact set
// of power-down commands are this design's choices. Outputs are registered.
module power_manager
  import dll_pkg::*;
#(
  parameter int unsigned FAST_BIAS_CYCLES = 4,   // 2 ns at 1.6 GHz, rounded up
  parameter bit          TRIG_ON_ACT      = 1'b1
) (
  input  logic      clk,           // reference clock (runs while idle)
  input  logic      rst_n,
  input  ca_cmd_e   cmd,           // decoded command, one per cycle
  input  logic      dll_tracking,  // DLL has left fast-lock mode
  output pm_state_e state,
  output logic      bias_en,       // fast bias and analog blocks on
  output logic      dll_en,        // DLL enabled (starts fast lock)
  output logic      link_ready,    // read data may be launched
  output logic      wake           // one-cycle pulse on a wake-up
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned BW = $clog2(FAST_BIAS_CYCLES + 1) + 1;

  logic [BW-1:0] cnt;
  logic          trigger, sleep;

  always_comb begin
    trigger = (cmd == CMD_RD) || (TRIG_ON_ACT && cmd == CMD_ACT);
    sleep   = (cmd == CMD_PRE) || (cmd == CMD_PDE) || (cmd == CMD_REF) || (cmd == CMD_SRE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PM_IDLE;
      cnt   <= '0;
      wake  <= 1'b0;
    end else begin
      wake <= 1'b0;
      if (sleep) begin
        state <= PM_IDLE;
      end else begin
        unique case (state)
          PM_IDLE: if (trigger) begin
            state <= PM_FAST_BIAS;
            cnt   <= BW'(FAST_BIAS_CYCLES - 1);
            wake  <= 1'b1;
          end
          PM_FAST_BIAS: begin
            if (cnt == '0) state <= PM_FAST_LOCK;
            else           cnt   <= cnt - 1'b1;
          end
          PM_FAST_LOCK: if (dll_tracking) state <= PM_READY;
          default: ;
        endcase
      end
    end
  end

  assign bias_en    = (state != PM_IDLE);
  assign dll_en     = (state == PM_FAST_LOCK) || (state == PM_READY);
  assign link_ready = (state == PM_READY);

endmodule
