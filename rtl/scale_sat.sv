// scale_sat: normalized min-sum scaling unit with rounding and saturation.
//
// Multiplies a signed variable-to-check message by the normalization factor 0.75 with two
// arithmetic right shifts and one addition: y = (x >>> 1) + (x >>> 2) + cin. The carry-in is
// the OR of the two least significant input bits, which rounds the result to the nearest
// integer, halves upward (y = floor((3x + 2) / 4)). The sum is then saturated to the output
// width. Purely combinational.
//
// The shift-add structure and the OR-ed carry-in follow the document's scaling unit. The
// saturation limits are symmetric, +/-(2^(WO-1) - 1), a choice of this design: it keeps the
// magnitude of every message representable in WO-1 bits for the sign-magnitude CNU.
module scale_sat #(
  parameter int WI = 9,                       // input (unscaled sum) width
  parameter int WO = 6                        // output message width
) (
  input  logic signed [WI-1:0] x,
  output logic signed [WO-1:0] y,
  output logic                 sat            // the scaled value was clipped
);
  localparam int MAXV = 2 ** (WO - 1) - 1;

  logic signed [WI:0] sum;

  always_comb begin
    sum = (WI+1)'(x >>> 1) + (WI+1)'(x >>> 2) + $signed({{WI{1'b0}}, x[1] | x[0]});
    sat = 1'b0;
    if (sum > (WI+1)'(MAXV)) begin
      y   = WO'(MAXV);
      sat = 1'b1;
    end else if (sum < -(WI+1)'(MAXV)) begin
      y   = WO'(-MAXV);
      sat = 1'b1;
    end else begin
      y = WO'(sum);
    end
  end
endmodule
