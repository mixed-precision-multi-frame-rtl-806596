// prec_ctrl: precision control unit placed in front of a low-precision check node unit.
//
// Converts a signed fixed-point message of WI bits to WO bits by dropping the WI-WO least
// significant (fractional) bits with rounding: half an output LSB is added before the
// arithmetic right shift (round half up). With the defaults it turns a (5,1) message
// (5 integer bits including sign, 1 fraction bit) into a (5,0) message. A result that
// overflows the output range is saturated to +/-(2^(WO-1) - 1). Purely combinational.
//
// The unit's place and its purpose (round the VNU's higher-precision message to the width
// of a lower-precision CNU) follow the document; the round-half-up rule and the symmetric
// saturation are choices of this design.
module prec_ctrl #(
  parameter int WI = 6,
  parameter int WO = 5
) (
  input  logic signed [WI-1:0] x,
  output logic signed [WO-1:0] y
);
  localparam int D    = WI - WO;
  localparam int MAXV = 2 ** (WO - 1) - 1;

  logic signed [WI:0] t;

  always_comb begin
    t = (WI+1)'(x) + (WI+1)'(2 ** D / 2);
    t = t >>> D;
    if (t > (WI+1)'(MAXV))       y = WO'(MAXV);
    else if (t < -(WI+1)'(MAXV)) y = WO'(-MAXV);
    else                y = WO'(t);
  end

  initial assert (WI > WO) else $error("prec_ctrl: WI must exceed WO");
endmodule
