// parity_check: syndrome check of the hard decisions ("Check" of the decoder loop).
//
// Computes every parity check of the expanded IEEE 802.16e rate-1/2 matrix (12*Z checks
// over 24*Z bits) as the XOR of the hard decisions of the check's variable nodes, and
// reports ok = 1 when all of them are satisfied (x * H^T = 0), meaning the hard decisions
// form a codeword and decoding of the frame can stop. Purely combinational.
module parity_check
  import ldpc_pkg::*;
#(
  parameter int Z = 48                        // expansion factor
) (
  input  logic [BG_COLS*Z-1:0] hd,            // hard decisions, bit c*Z+j = variable j of block c
  output logic [BG_ROWS*Z-1:0] syn,           // syndrome, bit r*Z+k = check k of block row r
  output logic                 ok
);
  for (genvar r = 0; r < BG_ROWS; r++) begin : g_row
    localparam int DEG = ROW_DEG[r];
    for (genvar k = 0; k < Z; k++) begin : g_chk
      logic [DEG-1:0] bits;
      for (genvar s = 0; s < DEG; s++) begin : g_bit
        localparam int C = ROW_COL[r*8+s];
        localparam int P = shift_z(r, C, Z);
        assign bits[s] = hd[C * Z + (k + P) % Z];
      end
      assign syn[r * Z + k] = ^bits;
    end
  end

  assign ok = ~|syn;
endmodule
