// clk_dist_model: behavioural model of a clock distribution buffer or its
// replica (not synthesizable; it stands for an analog buffer chain).
//
// The output is the input clock delayed by a transport delay of
// T_BUF_PS - KV_PS_PER_MV * dv_mv picoseconds. dv_mv is the supply
// deviation in millivolts; a higher supply speeds the buffers up. The
// sensitivity default of 1.1 ps/mV is the raw delay-line supply
// sensitivity quoted for the design; the 930 ps nominal delay is this
// model's choice (the design states a 1 mm long distribution network but
// not its delay). Edges pass in order as long as the delay changes by less
// than half a clock period between edges.
module clk_dist_model #(
  parameter real T_BUF_PS     = 930.0,
  parameter real KV_PS_PER_MV = 1.1
) (
  input  logic              clk_in,
  input  logic signed [7:0] dv_mv,
  output logic              clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic q;

  initial q = 1'b0;

  // each input edge spawns its own delayed copy, so edges closer together
  // than the delay are all kept (transport delay)
  always @(clk_in) begin
    automatic logic    v = clk_in;
    automatic realtime d = T_BUF_PS - KV_PS_PER_MV * real'(dv_mv);
    if (d < 1.0) d = 1.0;
    fork
      begin
        #(d);
        q = v;
      end
    join_none
  end

  assign clk_out = q;

endmodule
