// ldpc_mf_decoder: three-stage, multi-frame, mixed-precision fully parallel LDPC decoder.
//
// Decodes the IEEE 802.16e rate-1/2 QC-LDPC code of length N = 24*Z (1152 bits for the
// default Z = 48) with the normalized min-sum algorithm (scaling factor 0.75). Every
// variable node has its own VNU and every check node its own CNU, wired as the code's
// Tanner graph. The iteration loop is cut by registers into three pipeline stages:
//   stage 1  VNU array: soft decision, hard decision and extrinsic sums of every variable
//            node, from the channel LLRs of slot A and the registered check messages;
//   stage 2  CNU stage 1: 0.75 scaling with rounding and saturation, precision control and
//            two's complement to sign-magnitude (cnu_stage1); in parallel the parity check
//            of the stage-1 hard decisions decides whether the frame is finished;
//   stage 3  CNU stage 2: min / sub-min finder, output select, sign, back to two's
//            complement and precision alignment (cnu_stage2).
// An iteration of one frame therefore takes three clocks, and three independent frames are
// decoded at once, one per stage. The frame memory (frame_memory) is a ring of three slots
// moving with the pipeline; it carries each frame's LLRs, tag and iteration count, and it
// takes a new frame in whenever the slot in front of the input multiplexer is empty.
//
// Precision mixing: VNUs and all messages between VNU and CNU are 6 bits (5 integer, 1
// fraction bit). Each CNU runs at 6 bits or, where ldpc_pkg::cnu_is_low selects it, at 5 bits
// (5 integer bits): a precision control unit rounds its inputs to 5 bits and a precision
// alignment unit appends a zero fraction bit to its outputs. PREC_MODE picks the mixed array
// (half and half) or one of the two uniform arrays.
//
// Interface and timing:
//   in_valid / in_ready  a frame (in_llr, in_tag) is accepted at a rising clock edge where
//                        both are high. in_llr[i] is the channel LLR of code bit i, signed
//                        (5,1) fixed point: the value is in_llr / 2, positive means bit 0.
//   out_valid            high for one clock when a frame leaves: out_bits holds its hard
//                        decisions, out_tag its tag, out_iter the iterations it took and
//                        out_converged whether all parity checks held (0 when it stopped at
//                        MAX_ITER). A frame accepted at edge t that stops after k iterations
//                        is output after edge t + 3k - 1. Frames can leave out of order.
//   rst_n                asynchronous, active low; empties the decoder.
// There is no output back-pressure.
//
// The code, the algorithm, the three-stage cut, the frame ring and the precision mixing
// follow the document. The frame tag, the handshake, the maximum of 32 iterations and the
// fixed pseudo-random placement of the 5-bit CNUs are this design's choices.
module ldpc_mf_decoder
  import ldpc_pkg::*;
#(
  parameter int         Z         = 48,          // expansion factor: N = 24*Z
  parameter int         MAX_ITER  = 32,          // iterations before a frame is given up
  parameter int         TAG_W     = 8,
  parameter prec_mode_e PREC_MODE = PREC_MIXED
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic signed [WV-1:0]       in_llr [BG_COLS*Z],
  input  logic [TAG_W-1:0]           in_tag,
  output logic                       out_valid,
  output logic [BG_COLS*Z-1:0]       out_bits,
  output logic [TAG_W-1:0]           out_tag,
  output logic [ITER_W-1:0]          out_iter,
  output logic                       out_converged
);
  localparam int N = BG_COLS * Z;
  localparam int E = BG_EDGES * Z;

  // ---------------- frame memory ----------------
  logic                 a_valid, b_valid, c_empty, b_done;
  logic signed [WV-1:0] a_llr [N];
  logic [TAG_W-1:0]     b_tag;
  logic [ITER_W-1:0]    b_iter;

  frame_memory #(.N(N), .WV(WV), .TAG_W(TAG_W), .ITER_W(ITER_W)) u_mem (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_llr, .in_tag,
    .a_valid, .a_llr,
    .b_valid, .b_tag, .b_iter, .b_done,
    .c_empty);

  // ---------------- pipeline registers ----------------
  logic signed [WV-1:0] r_reg   [E];          // check-to-variable messages (frame in A)
  logic signed [WS-1:0] q_reg   [E];          // unscaled extrinsic sums (frame in B)
  logic [N-1:0]         hd_reg;               // hard decisions (frame in B)
  logic                 sgn_reg [E];          // sign-magnitude messages (frame in C)
  logic [WV-2:0]        mag_reg [E];

  logic signed [WS-1:0] q_nxt   [E];
  logic [N-1:0]         hd_nxt;
  logic                 sgn_nxt [E];
  logic [WV-2:0]        mag_nxt [E];
  logic signed [WV-1:0] r_nxt   [E];
  logic [E-1:0]         sat_vec;
  // a_valid and sat_any drive no logic: they are observation points for simulation and
  // debug (slot A holds a frame; some scaler saturated this cycle).
  logic                 sat_any;

  // ---------------- stage 1: VNU array ----------------
  for (genvar c = 0; c < BG_COLS; c++) begin : g_vcol
    localparam int DEG = COL_DEG[c];
    for (genvar j = 0; j < Z; j++) begin : g_vnu
      logic signed [WV-1:0] rin  [DEG];
      logic signed [WS-1:0] qout [DEG];
      for (genvar t = 0; t < DEG; t++) begin : g_e
        localparam int R  = COL_ROW[c*8+t];
        localparam int S  = COL_SLOT[c*8+t];
        localparam int K  = (j - shift_z(R, c, Z) + Z) % Z;
        localparam int EI = Z * (ROW_PRE[R] + S) + K;
        assign rin[t]    = r_reg[EI];
        assign q_nxt[EI] = qout[t];
      end
      vnu #(.DEG(DEG), .WV(WV), .WS(WS)) u_vnu (
        .l(a_llr[c*Z+j]), .r(rin), .q(qout), .p(), .hd(hd_nxt[c*Z+j]));
    end
  end

  always_ff @(posedge clk) begin
    q_reg  <= q_nxt;
    hd_reg <= hd_nxt;
  end

  // ---------------- stage 2: CNU stage 1 and parity check ----------------
  for (genvar r = 0; r < BG_ROWS; r++) begin : g_crow
    localparam int DEG = ROW_DEG[r];
    for (genvar k = 0; k < Z; k++) begin : g_cnu
      localparam bit LOW = cnu_is_low(r * Z + k, PREC_MODE);
      localparam int WC  = LOW ? WL : WV;
      logic signed [WS-1:0] qin  [DEG];
      logic                 s1s  [DEG];
      logic [WV-2:0]        s1m  [DEG];
      logic                 s2s  [DEG];
      logic [WV-2:0]        s2m  [DEG];
      logic signed [WV-1:0] rout [DEG];
      logic [DEG-1:0]       sat;
      for (genvar s = 0; s < DEG; s++) begin : g_e
        localparam int EI = Z * (ROW_PRE[r] + s) + k;
        assign qin[s]      = q_reg[EI];
        assign sgn_nxt[EI] = s1s[s];
        assign mag_nxt[EI] = s1m[s];
        assign sat_vec[EI] = sat[s];
        assign s2s[s]      = sgn_reg[EI];
        assign s2m[s]      = mag_reg[EI];
        assign r_nxt[EI]   = rout[s];
      end
      cnu_stage1 #(.DEG(DEG), .WS(WS), .WV(WV), .WC(WC)) u_cnu1 (
        .q(qin), .sgn(s1s), .mag(s1m), .sat(sat));
      cnu_stage2 #(.DEG(DEG), .WV(WV), .WC(WC)) u_cnu2 (
        .sgn(s2s), .mag(s2m), .r(rout));
    end
  end

  assign sat_any = |sat_vec;

  logic chk_ok;

  parity_check #(.Z(Z)) u_chk (.hd(hd_reg), .syn(), .ok(chk_ok));

  assign b_done = b_valid && (chk_ok || b_iter >= ITER_W'(MAX_ITER));

  always_ff @(posedge clk) begin
    sgn_reg <= sgn_nxt;
    mag_reg <= mag_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= b_done;
  end

  always_ff @(posedge clk) begin
    if (b_done) begin
      out_bits      <= hd_reg;
      out_tag       <= b_tag;
      out_iter      <= b_iter;
      out_converged <= chk_ok;
    end
  end

  // ---------------- stage 3: CNU stage 2 ----------------
  // An empty slot C means the frame that enters slot A next is new: its check messages
  // start from zero.
  always_ff @(posedge clk) begin
    for (int e = 0; e < E; e++) r_reg[e] <= c_empty ? '0 : r_nxt[e];
  end

  initial assert (MAX_ITER >= 1 && MAX_ITER < 2 ** ITER_W)
    else $error("ldpc_mf_decoder: MAX_ITER out of range");
endmodule
