// tb_frame_memory: random test of the three-slot frame ring with N = 4 LLRs per frame.
// A cycle model of the slots (A <- C if C holds a frame, else the input; B <- A with the
// iteration count plus one; C <- B, emptied when b_done) predicts every output; random
// input offers and random "frame finished" marks exercise loading, recirculation and
// emptying of slots.
module tb_frame_memory;
  localparam int N = 4;
  int checks = 0, failures = 0;
  int loads = 0, recirc = 0, drops = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, a_valid, b_valid, b_done, c_empty;
  logic signed [5:0] in_llr [N];
  logic signed [5:0] a_llr [N];
  logic [7:0] in_tag, b_tag;
  logic [5:0] b_iter;

  frame_memory #(.N(N), .WV(6), .TAG_W(8), .ITER_W(6)) dut (.*);

  typedef struct {
    bit valid;
    int tag;
    int iter;
    int llr [N];
  } slot_t;
  slot_t ma, mb, mc;

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%0t: mismatch %s", $time, what);
    end
  endtask

  initial begin
    ma.valid = 0; mb.valid = 0; mc.valid = 0;
    in_valid = 0; b_done = 0; in_tag = 0;
    foreach (in_llr[i]) in_llr[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      slot_t na, nb, nc;
      @(negedge clk);
      in_valid = ($urandom_range(99) < 60);
      in_tag   = 8'($urandom_range(255));
      foreach (in_llr[i]) in_llr[i] = 6'($urandom_range(63));
      b_done   = b_valid && ($urandom_range(99) < 30);
      #1;
      chk(in_ready == !mc.valid, "in_ready");
      chk(c_empty == !mc.valid, "c_empty");
      if (in_valid && in_ready) loads++;
      if (mc.valid) recirc++;
      if (b_done) drops++;
      // model step
      if (mc.valid) na = mc;
      else begin
        na.valid = in_valid;
        na.tag   = int'(in_tag);
        na.iter  = 0;
        foreach (in_llr[i]) na.llr[i] = int'(in_llr[i]);
      end
      nb = ma;
      nb.iter = (ma.iter + 1) % 64;
      nc = mb;
      nc.valid = mb.valid && !b_done;
      @(posedge clk);
      #1;
      ma = na; mb = nb; mc = nc;
      chk(a_valid == ma.valid, "a_valid");
      if (ma.valid) foreach (a_llr[i]) chk(int'(a_llr[i]) == ma.llr[i], "a_llr");
      chk(b_valid == mb.valid, "b_valid");
      if (mb.valid) begin
        chk(int'(b_tag) == mb.tag, "b_tag");
        chk(int'(b_iter) == mb.iter, "b_iter");
      end
    end
    chk(loads > 100 && recirc > 100 && drops > 50, "all mechanisms exercised");
    $display("loads=%0d recirculations=%0d empty-marks=%0d", loads, recirc, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
