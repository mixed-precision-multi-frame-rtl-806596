// ldpc_pkg: code description and shared constants of the multi-frame LDPC decoder.
//
// The code is the IEEE 802.16e (WiMAX) rate-1/2 quasi-cyclic LDPC code. Its 12 x 24 base
// matrix BASE holds, for each Z x Z sub-matrix, the right cyclic shift of the identity
// matrix, or -1 for an all-zero sub-matrix. The shifts are the standard's values for the
// largest expansion factor Z0 = 96; for another expansion factor Z the shift is
// floor(p * Z / 96), the rate-1/2 scaling rule of the standard. Row k of a sub-matrix with
// shift p has its single one in column (k + p) mod Z.
//
// Messages are indexed by edge. The edges of base row r, nonzero number s (counting from
// the left), occupy the Z consecutive indices Z * (ROW_PRE[r] + s) + k, k = 0 .. Z-1, where
// ROW_PRE[r] is the number of nonzeros in the base rows above r. Check node r*Z+k therefore
// owns indices Z*(ROW_PRE[r]+s)+k for s < ROW_DEG[r].
//
// The tables below are computed from BASE at elaboration time and are used to wire the
// fully parallel Tanner graph; the testbenches use them too. The choice of which check
// nodes run at the low (5-bit) precision is also made here (cnu_is_low).
package ldpc_pkg;

  localparam int BG_ROWS = 12;
  localparam int BG_COLS = 24;
  localparam int Z0      = 96;
  localparam int BG_EDGES = 76;        // nonzeros of the base matrix

  // Message formats. VNU messages and channel LLRs are 6-bit (5 integer, 1 fraction bit);
  // low-precision CNUs work on 5-bit (5 integer, 0 fraction bits) messages.
  localparam int WV  = 6;              // VNU / high CNU precision
  localparam int WL  = 5;              // low CNU precision
  localparam int WS  = WV + 3;         // unscaled VNU sum: up to 7 terms of WV bits
  localparam int ITER_W = 6;           // iteration counter carried with each frame

  // Precision assignment of the check node array.
  typedef enum logic [1:0] {
    PREC_MIXED = 2'd0,                 // half the CNUs 6-bit, half 5-bit
    PREC_HIGH  = 2'd1,                 // all CNUs 6-bit (5,1)
    PREC_LOW   = 2'd2                  // all CNUs 5-bit (5,0)
  } prec_mode_e;

  typedef int base_t [BG_ROWS][BG_COLS];
  localparam base_t BASE = '{
    '{-1, 94, 73, -1, -1, -1, -1, -1, 55, 83, -1, -1,  7,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, 27, -1, -1, -1, 22, 79,  9, -1, -1, -1, 12, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, 24, 22, 81, -1, 33, -1, -1, -1,  0, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1, -1},
    '{61, -1, 47, -1, -1, -1, -1, -1, 65, 25, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1, -1},
    '{-1, -1, 39, -1, -1, -1, 84, -1, -1, 41, 72, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1, -1},
    '{-1, -1, -1, -1, 46, 40, -1, 82, -1, -1, -1, 79,  0, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1, -1},
    '{-1, -1, 95, 53, -1, -1, -1, -1, -1, 14, 18, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1, -1},
    '{-1, 11, 73, -1, -1, -1,  2, -1, -1, 47, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1, -1},
    '{12, -1, -1, -1, 83, 24, -1, 43, -1, -1, -1, 51, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1, -1},
    '{-1, -1, -1, -1, -1, 94, -1, 59, -1, -1, 70, 72, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0, -1},
    '{-1, -1,  7, 65, -1, -1, -1, -1, 39, 49, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0,  0},
    '{43, -1, -1, -1, -1, 66, -1, 41, -1, -1, -1, 26,  7, -1, -1, -1, -1, -1, -1, -1, -1, -1, -1,  0}
  };

  typedef int row_tab_t [BG_ROWS];
  typedef int row_col_tab_t [BG_ROWS*8];     // entry [r*8+s]
  typedef int col_tab_t [BG_COLS];
  typedef int col_row_tab_t [BG_COLS*8];     // entry [c*8+t]

  // Tables derived from BASE once, so that elaboration does not repeat the scans.
  function automatic row_tab_t f_row_deg();
    row_tab_t t;
    for (int r = 0; r < BG_ROWS; r++) begin
      t[r] = 0;
      for (int c = 0; c < BG_COLS; c++) if (BASE[r][c] >= 0) t[r]++;
    end
    return t;
  endfunction

  function automatic row_tab_t f_row_pre();
    row_tab_t t;
    int acc = 0;
    for (int r = 0; r < BG_ROWS; r++) begin
      t[r] = acc;
      for (int c = 0; c < BG_COLS; c++) if (BASE[r][c] >= 0) acc++;
    end
    return t;
  endfunction

  // ROW_COL[r*8+s]: base column of nonzero number s of base row r (-1 past the last).
  function automatic row_col_tab_t f_row_col();
    row_col_tab_t t;
    for (int r = 0; r < BG_ROWS; r++) begin
      int n = 0;
      for (int s = 0; s < 8; s++) t[r*8+s] = -1;
      for (int c = 0; c < BG_COLS; c++)
        if (BASE[r][c] >= 0) begin
          t[r*8+n] = c;
          n++;
        end
    end
    return t;
  endfunction

  function automatic col_tab_t f_col_deg();
    col_tab_t t;
    for (int c = 0; c < BG_COLS; c++) begin
      t[c] = 0;
      for (int r = 0; r < BG_ROWS; r++) if (BASE[r][c] >= 0) t[c]++;
    end
    return t;
  endfunction

  // COL_ROW[c*8+t]: base row of nonzero number t of base column c (-1 past the last).
  function automatic col_row_tab_t f_col_row();
    col_row_tab_t t;
    for (int c = 0; c < BG_COLS; c++) begin
      int n = 0;
      for (int i = 0; i < 8; i++) t[c*8+i] = -1;
      for (int r = 0; r < BG_ROWS; r++)
        if (BASE[r][c] >= 0) begin
          t[c*8+n] = r;
          n++;
        end
    end
    return t;
  endfunction

  // COL_SLOT[c*8+t]: position of base column c among the nonzeros of row COL_ROW[c*8+t].
  function automatic col_row_tab_t f_col_slot();
    col_row_tab_t t;
    for (int c = 0; c < BG_COLS; c++) begin
      int n = 0;
      for (int i = 0; i < 8; i++) t[c*8+i] = -1;
      for (int r = 0; r < BG_ROWS; r++)
        if (BASE[r][c] >= 0) begin
          t[c*8+n] = 0;
          for (int i = 0; i < c; i++) if (BASE[r][i] >= 0) t[c*8+n]++;
          n++;
        end
    end
    return t;
  endfunction

  localparam row_tab_t     ROW_DEG  = f_row_deg();
  localparam row_tab_t     ROW_PRE  = f_row_pre();
  localparam row_col_tab_t ROW_COL  = f_row_col();
  localparam col_tab_t     COL_DEG  = f_col_deg();
  localparam col_row_tab_t COL_ROW  = f_col_row();
  localparam col_row_tab_t COL_SLOT = f_col_slot();

  // Cyclic shift of base entry (r, c) for expansion factor z.
  function automatic int shift_z(int r, int c, int z);
    return (BASE[r][c] * z) / Z0;
  endfunction

  // Precision of check node m: 1 selects the low (5-bit) CNU. In mixed mode the check
  // nodes are taken in pairs (2i, 2i+1) and a fixed pseudo-random bit of i picks which of
  // the two is low, so exactly half the CNUs are low precision, scattered over the array.
  function automatic bit cnu_is_low(int m, prec_mode_e mode);
    logic [31:0] h;
    if (mode == PREC_HIGH) return 1'b0;
    if (mode == PREC_LOW)  return 1'b1;
    h = 32'(m / 2) * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    return h[7] ^ logic'(m % 2);
  endfunction

endpackage
