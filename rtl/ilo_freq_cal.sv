// ilo_freq_cal: counter-based calibration of the ILO free-running frequency.
//
// The same 8-stage cell sets both the TDC delay-line resolution and the
// phase step of the ILO, so the ILO free-running frequency is calibrated to
// the reference before use (again after a data-rate change). With injection
// off, a window of WIN reference cycles gates a counter clocked by the ILO;
// a count above WIN means the trial tuning code runs the ILO faster than
// the reference. A successive-approximation search over TUNE_BITS bits then
// keeps the largest code whose ILO count does not exceed WIN (a larger code
// is taken to give a higher frequency).
//
// That a digital counter does the calibration follows the design
// description; the window length, the binary search and the monotonic code
// polarity are this design's choices.
//
// Clock domains: clk (reference) runs the search; ilo_clk runs only the
// edge counter. The gate crosses into the ILO domain through two flops, so
// opening and closing are delayed alike. The count is read in the reference
// domain SETTLE cycles after the gate closes, when it no longer changes.
// Timing: one trial takes WIN + SETTLE + 2 reference cycles; done rises
// after TUNE_BITS trials and holds until the next start.
module ilo_freq_cal #(
  parameter int unsigned TUNE_BITS = 8,
  parameter int unsigned WIN       = 256,  // reference cycles per trial
  parameter int unsigned SETTLE    = 6     // cycles from gate close to read
) (
  input  logic                 clk,       // reference clock
  input  logic                 rst_n,
  input  logic                 start,     // pulse: begin a calibration
  input  logic                 ilo_clk,   // free-running ILO output
  output logic [TUNE_BITS-1:0] tune,      // code to the ILO
  output logic                 busy,      // ILO must free-run, injection off
  output logic                 done
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = $clog2(2 * WIN + 1) + 1;  // ILO count width
  localparam int unsigned TW = $clog2(WIN + SETTLE + 1) + 1;

  typedef enum logic [1:0] {C_IDLE, C_GATE, C_WAIT} cal_state_e;

  cal_state_e              state;
  logic [TUNE_BITS-1:0]    result;
  logic [$clog2(TUNE_BITS+1)-1:0] bit_idx;  // bits still to decide
  logic [TW-1:0]           timer;
  logic                    gate;

  // ILO domain: synchronize the gate, count ILO edges while it is open.
  logic       gate_s1, gate_s2, gate_s3;
  logic [CW-1:0] ilo_cnt;

  always_ff @(posedge ilo_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_s1 <= 1'b0;
      gate_s2 <= 1'b0;
      gate_s3 <= 1'b0;
      ilo_cnt <= '0;
    end else begin
      gate_s1 <= gate;
      gate_s2 <= gate_s1;
      gate_s3 <= gate_s2;
      if (gate_s2 && !gate_s3)      ilo_cnt <= CW'(1);   // window opens
      else if (gate_s2 && ilo_cnt != '1) ilo_cnt <= ilo_cnt + 1'b1;
    end
  end

  // Reference domain: successive approximation.
  logic [TUNE_BITS-1:0] trial_bit;
  always_comb trial_bit = (bit_idx == '0) ? '0 : TUNE_BITS'(1) << (bit_idx - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      result  <= '0;
      bit_idx <= '0;
      timer   <= '0;
      gate    <= 1'b0;
      tune    <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE: begin
          if (start) begin
            result  <= '0;
            bit_idx <= ($clog2(TUNE_BITS+1))'(TUNE_BITS);
            tune    <= TUNE_BITS'(1) << (TUNE_BITS - 1);
            busy    <= 1'b1;
            done    <= 1'b0;
            gate    <= 1'b1;
            timer   <= TW'(WIN - 1);
            state   <= C_GATE;
          end
        end
        C_GATE: begin
          if (timer == '0) begin
            gate  <= 1'b0;
            timer <= TW'(SETTLE);
            state <= C_WAIT;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        C_WAIT: begin
          if (timer == '0) begin
            logic [TUNE_BITS-1:0] r;
            r = (ilo_cnt > CW'(WIN)) ? result : (result | trial_bit);
            result <= r;
            if (bit_idx == 1) begin
              tune    <= r;
              busy    <= 1'b0;
              done    <= 1'b1;
              bit_idx <= '0;
              state   <= C_IDLE;
            end else begin
              tune    <= r | (trial_bit >> 1);
              bit_idx <= bit_idx - 1'b1;
              gate    <= 1'b1;
              timer   <= TW'(WIN - 1);
              state   <= C_GATE;
            end
          end else begin
            timer <= timer - 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
