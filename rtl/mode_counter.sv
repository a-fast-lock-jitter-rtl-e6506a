// mode_counter: fast-lock to continuous-tracking mode switch.
//
// The switch from fast lock to tracking is pre-programmed: a counter preset
// to the number of reference cycles the DLL spends in fast-lock mode. The
// TDC needs two cycles to produce its code and one to hold it, so the
// default preset is 3. While en is low the mode is OFF; when en rises the
// mode is FAST_LOCK for `preset` cycles (preset = 0 is treated as 1), then
// TRACK until en falls. switch_pulse marks the first TRACK cycle.
//
// Timing: mode changes on the clock edge; the first FAST_LOCK cycle is the
// one after en is sampled high.
module mode_counter
  import dll_pkg::*;
#(
  parameter int unsigned CNT_BITS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [CNT_BITS-1:0] preset,
  output dll_mode_e           mode,
  output logic                switch_pulse
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [CNT_BITS-1:0] left;   // fast-lock cycles still to spend

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode         <= MODE_OFF;
      left         <= '0;
      switch_pulse <= 1'b0;
    end else begin
      switch_pulse <= 1'b0;
      if (!en) begin
        mode <= MODE_OFF;
        left <= '0;
      end else begin
        unique case (mode)
          MODE_OFF: begin
            mode <= MODE_FAST_LOCK;
            left <= (preset == '0) ? CNT_BITS'(0) : preset - 1'b1;
          end
          MODE_FAST_LOCK: begin
            if (left == '0) begin
              mode         <= MODE_TRACK;
              switch_pulse <= 1'b1;
            end else begin
              left <= left - 1'b1;
            end
          end
          default: mode <= MODE_TRACK;
        endcase
      end
    end
  end

endmodule
