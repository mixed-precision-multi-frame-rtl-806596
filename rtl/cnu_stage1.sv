// cnu_stage1: first check-node pipeline stage (stage 2 of the decoder pipeline).
//
// For each of the DEG incoming variable-to-check messages:
//   1. scale_sat multiplies the VNU's unscaled extrinsic sum by 0.75, rounds and saturates
//      it to the WV-bit message format (normalized min-sum);
//   2. for a low-precision CNU (WC < WV) prec_ctrl rounds the message to WC bits;
//   3. the two's complement value is converted to sign and magnitude (WC-1 magnitude bits).
// The magnitudes are output zero-extended to WV-1 bits so that high and low precision CNUs
// share one register format. Purely combinational; the decoder top registers the outputs.
//
// The contents of this stage (scaling and saturation, two's complement to sign-magnitude)
// are the document's. Placing precision control after the scaling follows the document's
// text ("after summation and scaling ... goes to precision control units").
module cnu_stage1 #(
  parameter int DEG = 6,                      // check node degree
  parameter int WS  = 9,                      // unscaled VNU sum width
  parameter int WV  = 6,                      // VNU message width
  parameter int WC  = 6                       // this CNU's precision (WV or less)
) (
  input  logic signed [WS-1:0] q   [DEG],
  output logic                 sgn [DEG],
  output logic [WV-2:0]        mag [DEG],
  output logic [DEG-1:0]       sat            // per-edge saturation flag of the scaler
);
  logic signed [WV-1:0] qs [DEG];             // scaled, saturated message
  logic signed [WC-1:0] qc [DEG];             // message at this CNU's precision

  for (genvar i = 0; i < DEG; i++) begin : g_edge
    scale_sat #(.WI(WS), .WO(WV)) u_scale (.x(q[i]), .y(qs[i]), .sat(sat[i]));
    if (WC < WV) begin : g_pc
      prec_ctrl #(.WI(WV), .WO(WC)) u_pc (.x(qs[i]), .y(qc[i]));
    end else begin : g_nopc
      assign qc[i] = qs[i];
    end
    always_comb begin
      sgn[i] = qc[i][WC-1];
      mag[i] = (WV-1)'(qc[i][WC-1] ? -qc[i] : qc[i]);
    end
  end
endmodule
