// fine_tdc_decode: fine TDC thermometer-to-binary converter.
//
// After the coarse step, the two delay-line phases that bracket the
// reference edge are blended into four phases phi0..phi3 spaced T_REF/64,
// and the replica-delayed reference samples them. phi0 is the earlier coarse
// phase itself, so raw[0] is normally 1 and raw is a thermometer word
// 1..1 0..0. The 2-bit code is (number of leading ones) - 1: 4'b0001 -> 0,
// 4'b0011 -> 1, 4'b0111 -> 2, 4'b1111 -> 3. A word with raw[0] = 0 (edge
// before phi0, only possible through mismatch) gives 0.
//
// Combinational. The 4-bit raw and 2-bit output widths follow the design
// description; the leading-ones rule that ignores bubbles above the first
// zero is this design's choice.
module fine_tdc_decode
  import dll_pkg::*;
(
  input  logic [FINE_TAPS-1:0] raw,
  output logic [FINE_BITS-1:0] code
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    logic run;
    int   ones;
    run  = 1'b1;
    ones = 0;
    for (int i = 0; i < FINE_TAPS; i++) begin
      run = run & raw[i];
      if (run) ones++;
    end
    code = (ones == 0) ? '0 : FINE_BITS'(ones - 1);
  end

endmodule
