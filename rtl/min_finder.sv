// min_finder: minimum, second minimum and index of the minimum of N magnitudes.
//
// Works like a merge sort. The inputs are cut into groups of three, each reduced by a
// 3-input finder (mf_find3, 3 comparators) to an ordered (min, sub-min) pair. A remainder of
// two inputs is ordered by one comparator; a remainder of one input becomes the pair
// (input, all ones). The pairs are then merged one after another by mf_merge (3 comparators
// each). For N = 6 this is exactly two 3-input finders feeding one merger, 9 comparators in
// all; for N = 7 the seventh input is merged last. Purely combinational.
//
// The 3-input finder / 4-input merger structure follows the document; the handling of group
// remainders for degrees other than six is this design's choice.
module min_finder #(
  parameter int N  = 6,                       // number of inputs, at least 2
  parameter int WM = 5,                       // magnitude width
  parameter int IW = (N > 1) ? $clog2(N) : 1  // index width
) (
  input  logic [WM-1:0] mag [N],
  output logic [WM-1:0] min,
  output logic [WM-1:0] sub,
  output logic [IW-1:0] idx
);
  localparam int NG3 = N / 3;                 // full groups of three
  localparam int REM = N % 3;
  localparam int NG  = NG3 + ((REM != 0) ? 1 : 0);

  logic [WM-1:0] g_min [NG];
  logic [WM-1:0] g_sub [NG];
  logic [IW-1:0] g_idx [NG];

  for (genvar g = 0; g < NG3; g++) begin : g_grp3
    mf_find3 #(.WM(WM), .IW(IW), .BASE_IDX(3 * g)) u_f3 (
      .a(mag[3*g]), .b(mag[3*g+1]), .c(mag[3*g+2]),
      .min(g_min[g]), .sub(g_sub[g]), .idx(g_idx[g]));
  end

  if (REM == 2) begin : g_rem2
    always_comb begin
      if (mag[N-2] <= mag[N-1]) begin
        g_min[NG-1] = mag[N-2];  g_sub[NG-1] = mag[N-1];  g_idx[NG-1] = IW'(N - 2);
      end else begin
        g_min[NG-1] = mag[N-1];  g_sub[NG-1] = mag[N-2];  g_idx[NG-1] = IW'(N - 1);
      end
    end
  end else if (REM == 1) begin : g_rem1
    assign g_min[NG-1] = mag[N-1];
    assign g_sub[NG-1] = '1;
    assign g_idx[NG-1] = IW'(N - 1);
  end

  // Chain of mergers: acc[0] is group 0, acc[i] merges acc[i-1] with group i.
  logic [WM-1:0] a_min [NG];
  logic [WM-1:0] a_sub [NG];
  logic [IW-1:0] a_idx [NG];

  assign a_min[0] = g_min[0];
  assign a_sub[0] = g_sub[0];
  assign a_idx[0] = g_idx[0];

  for (genvar i = 1; i < NG; i++) begin : g_merge
    mf_merge #(.WM(WM), .IW(IW)) u_m (
      .a_min(a_min[i-1]), .a_sub(a_sub[i-1]), .a_idx(a_idx[i-1]),
      .b_min(g_min[i]),   .b_sub(g_sub[i]),   .b_idx(g_idx[i]),
      .min(a_min[i]), .sub(a_sub[i]), .idx(a_idx[i]));
  end

  assign min = a_min[NG-1];
  assign sub = a_sub[NG-1];
  assign idx = a_idx[NG-1];

  initial assert (N >= 2) else $error("min_finder: N must be at least 2");
endmodule
