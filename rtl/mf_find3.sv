// mf_find3: 3-input minimum / second-minimum finder, the leaf of the min_finder tree.
//
// Three comparators (a<=b, a<=c, b<=c) decide which input is the smallest and which is the
// second smallest. The index output is the position of the minimum (0, 1 or 2) added to the
// group's base index BASE_IDX. On a tie the earlier input is taken as the minimum.
// Purely combinational.
module mf_find3 #(
  parameter int WM = 5,                       // magnitude width
  parameter int IW = 3,                       // index width
  parameter int BASE_IDX = 0
) (
  input  logic [WM-1:0] a,
  input  logic [WM-1:0] b,
  input  logic [WM-1:0] c,
  output logic [WM-1:0] min,
  output logic [WM-1:0] sub,
  output logic [IW-1:0] idx
);
  logic c_ab, c_ac, c_bc;

  always_comb begin
    c_ab = a <= b;
    c_ac = a <= c;
    c_bc = b <= c;
    if (c_ab && c_ac) begin
      min = a;  idx = IW'(BASE_IDX);      sub = c_bc ? b : c;
    end else if (!c_ab && c_bc) begin
      min = b;  idx = IW'(BASE_IDX + 1);  sub = c_ac ? a : c;
    end else begin
      min = c;  idx = IW'(BASE_IDX + 2);  sub = c_ab ? a : b;
    end
  end
endmodule
