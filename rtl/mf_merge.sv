// mf_merge: "4-input" minimum / second-minimum finder that merges two sorted pairs.
//
// Each input pair is already ordered (a_min <= a_sub, b_min <= b_sub), so three comparators
// suffice: a_min against b_min picks the minimum; the second minimum is the smaller of the
// losing minimum and the winner's own second value (a_sub against b_min, a_min against
// b_sub). The index of the overall minimum is passed along. Purely combinational.
module mf_merge #(
  parameter int WM = 5,
  parameter int IW = 3
) (
  input  logic [WM-1:0] a_min,
  input  logic [WM-1:0] a_sub,
  input  logic [IW-1:0] a_idx,
  input  logic [WM-1:0] b_min,
  input  logic [WM-1:0] b_sub,
  input  logic [IW-1:0] b_idx,
  output logic [WM-1:0] min,
  output logic [WM-1:0] sub,
  output logic [IW-1:0] idx
);
  always_comb begin
    if (a_min <= b_min) begin
      min = a_min;  idx = a_idx;  sub = (a_sub <= b_min) ? a_sub : b_min;
    end else begin
      min = b_min;  idx = b_idx;  sub = (a_min <= b_sub) ? a_min : b_sub;
    end
  end
endmodule
