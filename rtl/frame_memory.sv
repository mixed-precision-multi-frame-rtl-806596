// frame_memory: the decoder's data memory, a ring of three frame slots A -> B -> C -> A.
//
// Each slot holds one frame: its channel LLRs, a valid bit (clear = empty slot), the frame's
// tag and its iteration count. The three slots shift one step every clock, in step with the
// three-stage decoder pipeline, so that the frame whose messages are in a pipeline stage is
// always the frame in the matching slot:
//   slot A feeds the channel LLRs to the VNU array (stage 1);
//   slot B belongs to the frame in CNU stage 1 (stage 2); moving A -> B adds one to the
//          iteration count, and the parity check result of that stage arrives here;
//   slot C belongs to the frame in CNU stage 2 (stage 3); moving B -> C clears the valid
//          bit of a frame that has finished (the "empty" mark).
// From C the frame goes back to A through the input multiplexer. When C is empty, the
// multiplexer loads a new frame from the input instead (in_ready = 1), and c_empty tells
// CNU stage 2 to clear the check messages, so the new frame starts from R = 0. When C is
// empty and no input is offered, A becomes an empty slot.
//
// Timing: a frame accepted at a clock edge is in A during the next cycle, in B the cycle
// after and in C the cycle after that; one decoding iteration takes three clocks.
// Reset (asynchronous, active low) empties all three slots; the LLR storage is not reset.
//
// The ring, the A -> B iteration increment, the empty mark and the input multiplexer
// controlled by C's empty flag follow the document's data-memory diagram; the tag (which
// lets frames leave out of order) and the valid/ready input handshake are this design's.
module frame_memory #(
  parameter int N      = 1152,                // code length
  parameter int WV     = 6,                   // LLR width
  parameter int TAG_W  = 8,
  parameter int ITER_W = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // new frames
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [WV-1:0]     in_llr [N],
  input  logic [TAG_W-1:0]         in_tag,
  // slot A: feeds the VNU array
  output logic                     a_valid,
  output logic signed [WV-1:0]     a_llr [N],
  // slot B: frame in CNU stage 1
  output logic                     b_valid,
  output logic [TAG_W-1:0]         b_tag,
  output logic [ITER_W-1:0]        b_iter,
  input  logic                     b_done,    // frame in B finished: mark it empty
  // slot C: frame in CNU stage 2
  output logic                     c_empty
);
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [ITER_W-1:0] iter;
  } slot_ctl_t;

  slot_ctl_t ctl_a, ctl_b, ctl_c;
  logic signed [WV-1:0] llr_b [N];
  logic signed [WV-1:0] llr_c [N];

  assign in_ready = !ctl_c.valid;
  assign c_empty  = !ctl_c.valid;
  assign a_valid  = ctl_a.valid;
  assign b_valid  = ctl_b.valid;
  assign b_tag    = ctl_b.tag;
  assign b_iter   = ctl_b.iter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_a <= '0;
      ctl_b <= '0;
      ctl_c <= '0;
    end else begin
      if (ctl_c.valid) ctl_a <= ctl_c;
      else             ctl_a <= '{valid: in_valid, tag: in_tag, iter: '0};
      ctl_b       <= ctl_a;
      ctl_b.iter  <= ctl_a.iter + 1'b1;
      ctl_c       <= ctl_b;
      ctl_c.valid <= ctl_b.valid && !b_done;
    end
  end

  always_ff @(posedge clk) begin
    a_llr <= ctl_c.valid ? llr_c : in_llr;
    llr_b <= a_llr;
    llr_c <= llr_b;
  end
endmodule
