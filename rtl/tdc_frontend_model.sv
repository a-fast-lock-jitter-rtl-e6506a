// tdc_frontend_model: behavioural model of the analog front end of the
// two-step TDC (not synthesizable).
//
// Modelled parts: the 8-stage differential delay line with 16 outputs, the
// 16 coarse samplers, the coarse phase multiplexer, the phase blender that
// interpolates four phases between the two selected taps, the 4 fine
// samplers and the matched delay that cancels the blender delay in the
// sampling path.
//
// The delay line is built from the same cells as the ILO and shares its
// tuning code, so its resolution is set by the ILO calibration: with the
// ILO free-running at f(tune) = F_MIN + (F_MAX - F_MIN)*tune/(2^TUNE_BITS-1),
// one stage delays ts = 1/(16 f(tune)). Calibrated to the reference, that is
// T_REF/16 (39 ps at 1.6 GHz) and the blended phases are T_REF/64 apart; a
// residual calibration error scales every tap by f_ref/f(tune).
// On each rising edge of smp_clk (the reference after the replica clock
// distribution) the model evaluates, from the measured reference period and
// high time, what each tap would hold:
//   coarse_raw[i] = ref(t - i*ts)
//   fine_raw[j]   = ref(t - coarse_sel*ts - j*ts/4)
// The blender is ideal (no DNL). With pwr_en low the front end is off and
// its outputs are 0. Outputs change only at smp_clk rising edges.
module tdc_frontend_model #(
  parameter int unsigned TUNE_BITS = 8,
  parameter real         F_MIN_MHZ = 400.0,
  parameter real         F_MAX_MHZ = 1600.0
) (
  input  logic        ref_clk,
  input  logic        smp_clk,      // replica-delayed reference
  input  logic        pwr_en,
  input  logic [3:0]  coarse_sel,   // coarse code choosing taps m and m+1
  input  logic [TUNE_BITS-1:0] tune, // delay-line tuning, shared with the ILO
  output logic [15:0] coarse_raw,
  output logic [3:0]  fine_raw
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime t_rise = 0.0;
  realtime per    = 0.0;
  realtime hi     = 0.0;

  always @(posedge ref_clk) begin
    if (t_rise > 0.0) per = $realtime - t_rise;
    t_rise = $realtime;
  end

  always @(negedge ref_clk) hi = $realtime - t_rise;

  function automatic logic tap(input realtime phi, input realtime lag);
    realtime x;
    x = phi - lag;
    x = x - per * $floor(x / per);
    return x < hi;
  endfunction

  initial begin
    coarse_raw = '0;
    fine_raw   = '0;
  end

  always @(posedge smp_clk) begin
    realtime phi, ts;
    if (!pwr_en || per <= 0.0 || hi <= 0.0) begin
      coarse_raw <= '0;
      fine_raw   <= '0;
    end else begin
      phi = $realtime - t_rise;
      ts  = 1.0e6 / (16.0 * (F_MIN_MHZ + (F_MAX_MHZ - F_MIN_MHZ) * real'(tune)
                             / real'((1 << TUNE_BITS) - 1)));
      for (int i = 0; i < 16; i++)
        coarse_raw[i] <= tap(phi, real'(i) * ts);
      for (int j = 0; j < 4; j++)
        fine_raw[j] <= tap(phi, real'(coarse_sel) * ts + real'(j) * ts / 4.0);
    end
  end

endmodule
