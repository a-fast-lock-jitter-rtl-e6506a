// decimator: decimation of bang-bang decisions ahead of the loop filter.
//
// The loop gain of the tracking loop contains a decimation factor
// K_D = 1/2^2: one phase update is made for every DECIM = 4 detector
// decisions. This block sums the DECIM decisions of a window as +1 (early)
// or -1 (late) and, at the end of the window, issues one update pulse: dec
// when the sum is positive (feedback early, more delay needed), inc when it
// is negative, none on a tie. Majority voting over the window is this
// design's reading of the decimation; the factor 4 is the design's.
//
// Timing: a window closes on the cycle that holds its DECIM-th valid
// decision; inc/dec are registered and last one cycle.
module decimator #(
  parameter int unsigned DECIM = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,   // a detector decision is present
  input  logic early,   // the decision: 1 = early, 0 = late
  output logic inc,     // increase phase code (less delay)
  output logic dec      // decrease phase code (more delay)
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = (DECIM > 1) ? $clog2(DECIM) : 1;
  localparam int unsigned SW = $clog2(DECIM + 1) + 1;

  logic [CW-1:0]        cnt;
  logic signed [SW-1:0] sum;
  logic signed [SW-1:0] sum_next;

  always_comb sum_next = sum + (early ? SW'(1) : -SW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sum <= '0;
      inc <= 1'b0;
      dec <= 1'b0;
    end else begin
      inc <= 1'b0;
      dec <= 1'b0;
      if (valid) begin
        if (cnt == CW'(DECIM - 1)) begin
          cnt <= '0;
          sum <= '0;
          dec <= (sum_next > 0);
          inc <= (sum_next < 0);
        end else begin
          cnt <= cnt + 1'b1;
          sum <= sum_next;
        end
      end
    end
  end

endmodule
