// ilo_demux_model: behavioural model of the injection-locked ring
// oscillator (ILO) and its demultiplexed reference injectors (not
// synthesizable).
//
// The ILO is an 8-stage ring; its output is taken at a fixed stage while
// the reference is injected into two adjacent stages selected by inj_en,
// with weights 0..4 and per-stage polarity. The model decodes the injected
// position as phase code
//   c = 32*polarity[s] + 4*s + weight[s+1]   (pair s, s+1 mod 8)
// and, locked, produces a clock whose rising edge follows each reference
// rising edge by T - c*T/64 (T = measured reference period): the
// complementary delay that makes the clock after the distribution buffer
// line up with the reference. Because the oscillator sets its own duty
// cycle, the locked output is high for exactly T/2 whatever the input duty
// cycle; this stands for the ILO's filtering of input duty-cycle
// distortion (within +-10 %). Jitter filtering itself is not modelled.
// With no injector enabled and osc_en high the ring free-runs at
// F_MIN_MHZ * (1 + 3*tune/(2^TUNE_BITS - 1)), i.e. 400 MHz to 1.6 GHz, the
// tuning range of the design; the linear law is this model's choice.
module ilo_demux_model #(
  parameter int unsigned TUNE_BITS = 8,
  parameter real         F_MIN_MHZ = 400.0,
  parameter real         F_MAX_MHZ = 1600.0
) (
  input  logic                 ref_clk,
  input  logic                 osc_en,     // oscillator powered
  input  logic [TUNE_BITS-1:0] tune,       // free-running frequency code
  input  logic [7:0]           inj_en,
  input  logic [7:0][2:0]      weight,
  input  logic [7:0]           polarity,
  output logic                 clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic    q_inj  = 1'b0;
  logic    q_free = 1'b0;
  realtime t_rise = 0.0;
  realtime per    = 0.0;
  logic    injected;

  assign injected = osc_en && (inj_en != '0);

  function automatic int decode_code();
    for (int s = 0; s < 8; s++)
      if (inj_en[s] && inj_en[(s + 1) % 8])
        return 32 * int'(polarity[s]) + 4 * s + int'(weight[(s + 1) % 8]);
    return 0;
  endfunction

  always @(posedge ref_clk) begin
    realtime d;
    if (t_rise > 0.0) per = $realtime - t_rise;
    t_rise = $realtime;
    if (injected && per > 0.0) begin
      d = per - real'(decode_code()) * per / 64.0;
      fork
        begin
          #(d);
          q_inj = 1'b1;
          #(per / 2.0);
          q_inj = 1'b0;
        end
      join_none
    end
  end

  initial begin
    forever begin
      realtime half;
      half = 1.0e6 / (2.0 * (F_MIN_MHZ + (F_MAX_MHZ - F_MIN_MHZ) * real'(tune)
                                           / real'((1 << TUNE_BITS) - 1)));
      #(half);
      q_free = osc_en && !injected && !q_free;
    end
  end

  assign clk_out = injected ? q_inj : (osc_en ? q_free : 1'b0);

endmodule
