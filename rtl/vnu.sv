// vnu: variable node unit of the normalized min-sum decoder.
//
// Adds the channel LLR L and the DEG check-to-variable messages R1..R_DEG into the soft
// decision P (eq. P = L + sum R). The adder tree is built from ternary adders: the messages
// are summed in groups of three, and the group sums are added together with L. The hard
// decision is the sign bit of P (1 when P < 0). For each edge the unit outputs the
// extrinsic sum Q_i = P - R_i. The 0.75 normalization of Q_i is not done here: in the
// three-stage pipeline it belongs to the next stage (scale_sat inside cnu_stage1).
// Purely combinational.
//
// Interface: l and r are signed WV-bit (5,1) fixed-point numbers; p and q are signed
// WS-bit numbers in the same units, wide enough that no sum can overflow.
module vnu #(
  parameter int DEG = 6,                      // variable node degree
  parameter int WV  = 6,                      // message width
  parameter int WS  = WV + 3                  // sum width
) (
  input  logic signed [WV-1:0] l,
  input  logic signed [WV-1:0] r  [DEG],
  output logic signed [WS-1:0] q  [DEG],
  output logic signed [WS-1:0] p,
  output logic                 hd
);
  localparam int NGRP = (DEG + 2) / 3;

  logic signed [WS-1:0] grp [NGRP];

  always_comb begin
    for (int g = 0; g < NGRP; g++) begin
      grp[g] = '0;
      for (int j = 3 * g; j < 3 * g + 3; j++)
        if (j < DEG) grp[g] = grp[g] + WS'(r[j]);
    end
    p = WS'(l);
    for (int g = 0; g < NGRP; g++) p = p + grp[g];
    hd = p[WS-1];
    for (int i = 0; i < DEG; i++) q[i] = p - WS'(r[i]);
  end

  initial assert ((DEG + 1) * (2 ** (WV - 1)) <= 2 ** (WS - 1))
    else $error("vnu: WS too narrow for DEG");
endmodule
