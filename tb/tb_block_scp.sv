// tb_block_scp: self-checking test of the block-based neighbourhood SCP.
//
// Splits random images into blocks of several sizes and strides (abutting
// blocks, blocks with gaps between them, overlapping blocks) and
// applies convolution, maximum and dilation kernels inside each block. The
// reference computes, block by block in raster order, the 3x3 windows of
// every block widened by one column to the right (the last image column
// repeated at the right image edge); the FRAME word must announce
// (BW-1) x (BH-2)*blocks. Random gaps and stalls; an unstalled frame checks the
// documented cycle count (input at one pixel per cycle, read-out at one
// pixel per cycle plus a few cycles per block).
module tb_block_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  always #5 clk = ~clk;

  block_scp #(.MAX_W(64), .MAX_BH(8), .MY_ID(8'd11)) dut (.*);

  `include "tb_stream.svh"

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic img_t ref_block(const ref img_t img, input int w, int h, int k [9],
                                     int pop, int rop, int bw, int bh, int sx, int sy,
                                     output int nblk);
    img_t o;
    int v [9];
    nblk = 0;
    for (int by = 0; by + bh <= h; by += sy)
      for (int bx = 0; bx + bw <= w; bx += sx) begin
        nblk++;
        for (int y = by; y + 2 < by + bh; y++)
          for (int x = bx; x + 1 < bx + bw; x++) begin
            for (int i = 0; i < 9; i++)
              v[i] = ref_pair(pop, px(img, w, (x + i % 3 < w) ? x + i % 3 : w - 1, y + i / 3), k[i]);
            o.push_back(clamp8(ref_reduce(rop, v)));
          end
      end
    return o;
  endfunction

  task automatic run_frame(int k [9], int pop, int rop, int bw, int bh, int sx, int sy,
                           int w, int h, int dest, string name, output int span, output int nblk);
    img_t img, exp;
    logic [31:0] hdr [$];
    int ops [] = new[15];
    int t0;
    for (int i = 0; i < 9; i++) ops[i] = k[i] & 8'hff;
    ops[9] = pop; ops[10] = rop; ops[11] = bw; ops[12] = bh; ops[13] = sx; ops[14] = sy;
    img = rand_img(w * h, (rop == 5) ? 1 : 0);
    exp = ref_block(img, w, h, k, pop, rop, bw, bh, sx == 0 ? bw : sx, sy == 0 ? bh : sy, nblk);
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_BLOCK, 8'd11, ops, 4'(dest));
    foreach (in_q[i])
      hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME) ? w_frame(12'(bw - 1), 12'((bh - 2) * nblk)) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size(), 50000);
    t0 = cyc;
    wait_out(hdr.size() + exp.size(), 50000);
    span = cyc - t0;
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int k [9], ones [9], span, nblk;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    ones = '{1, 1, 1, 1, 1, 1, 1, 1, 1};
    foreach (k[i]) k[i] = int'($urandom % 7) - 3;
    run_frame(k, 0, 0, 4, 4, 0, 0, 16, 12, 1, "conv 4x4 blocks", span, nblk);
    run_frame(k, 0, 1, 5, 3, 0, 0, 15, 9, 2, "abssum 5x3 blocks", span, nblk);
    run_frame(ones, 0, 2, 4, 5, 6, 7, 17, 19, 3, "max, gaps between blocks", span, nblk);
    run_frame(ones, 0, 5, 8, 8, 8, 8, 16, 16, 4, "dilation 8x8", span, nblk);
    run_frame(k, 0, 0, 3, 3, 4, 3, 13, 7, 5, "3x3 blocks, x stride 4", span, nblk);
    run_frame(k, 0, 0, 4, 5, 2, 2, 12, 13, 7, "overlapping 4x5 blocks, stride 2x2", span, nblk);
    run_frame(ones, 0, 2, 6, 8, 3, 3, 15, 20, 8, "overlapping 6x8 blocks, stride 3x3", span, nblk);
    src_gap = 0;
    sink_stall = 0;
    run_frame(ones, 0, 0, 8, 8, 0, 0, 32, 16, 6, "rate", span, nblk);
    // 512 input pixels plus 8 blocks of 9 x 8 read-out pixels, each block
    // followed by up to four cycles in which the engine drains and restarts
    check(span <= 512 + 8 * (72 + 4) + 8, $sformatf("rate: %0d cycles", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
