// cnu_stage2: second check-node pipeline stage (stage 3 of the decoder pipeline).
//
// Takes the sign-magnitude messages of one check node and produces its DEG
// check-to-variable messages by the min-sum rule: min_finder delivers the minimum, the
// second minimum and the index of the minimum; each output takes the second minimum if it
// is the minimum's own edge and the minimum otherwise. The output sign is the XOR of all
// input signs with the edge's own sign removed. The result is converted back to two's
// complement (WC bits) and, for a low-precision CNU, aligned to the WV-bit VNU format by
// appending WV-WC zero fraction bits (precision alignment unit). Purely combinational.
//
// Structure and order of operations follow the document's CNU; no offset is subtracted
// (normalized, not offset, min-sum).
module cnu_stage2 #(
  parameter int DEG = 6,
  parameter int WV  = 6,
  parameter int WC  = 6
) (
  input  logic                 sgn [DEG],
  input  logic [WV-2:0]        mag [DEG],     // only the low WC-1 bits are used
  output logic signed [WV-1:0] r   [DEG]
);
  localparam int WM = WC - 1;
  localparam int IW = $clog2(DEG);

  logic [WM-1:0] m_in [DEG];
  logic [WM-1:0] mn, sb;
  logic [IW-1:0] mi;
  logic          sgn_all;

  for (genvar i = 0; i < DEG; i++) begin : g_in
    assign m_in[i] = mag[i][WM-1:0];
  end

  min_finder #(.N(DEG), .WM(WM), .IW(IW)) u_mf (.mag(m_in), .min(mn), .sub(sb), .idx(mi));

  always_comb begin
    sgn_all = 1'b0;
    for (int i = 0; i < DEG; i++) sgn_all = sgn_all ^ sgn[i];
  end

  for (genvar i = 0; i < DEG; i++) begin : g_out
    logic [WM-1:0]        kappa;
    logic                 s;
    logic signed [WC-1:0] rc;
    always_comb begin
      kappa = (mi == IW'(i)) ? sb : mn;
      s     = sgn_all ^ sgn[i];
      rc    = s ? -$signed({1'b0, kappa}) : $signed({1'b0, kappa});
      r[i]  = WV'(rc) <<< (WV - WC);          // precision alignment: append zeros
    end
  end
endmodule
