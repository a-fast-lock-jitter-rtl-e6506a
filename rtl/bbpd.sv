// bbpd: bang-bang phase detector of the continuous-tracking loop.
//
// The DLL output, returned through the replica of the clock distribution,
// is sampled by a flip-flop on the rising edge of the reference clock. A 1
// means the feedback edge already rose before the reference edge (feedback
// early: the loop must add delay); a 0 means it is late. The result is
// registered once more so the loop filter sees a retimed decision one
// reference cycle after the sample. Only the name and place of the detector
// come from the design description; the two-flop form is this design's
// choice.
//
// Timing: early is valid one cycle after the sampling edge; valid follows
// en with the same latency.
module bbpd (
  input  logic clk,     // reference clock
  input  logic rst_n,
  input  logic en,      // detector in use (continuous tracking mode)
  input  logic fb_clk,  // replica-buffered DLL output
  output logic early,   // feedback edge was ahead of the reference edge
  output logic valid    // early holds a decision this cycle
);
  timeunit 1ps;
  timeprecision 1fs;

  logic sample_q, en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_q <= 1'b0;
      en_q     <= 1'b0;
      early    <= 1'b0;
      valid    <= 1'b0;
    end else begin
      sample_q <= fb_clk;
      en_q     <= en;
      early    <= sample_q;
      valid    <= en_q & en;
    end
  end

endmodule
