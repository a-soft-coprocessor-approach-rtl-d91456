// tb_neigh_scp: self-checking test of the generic 3x3 neighbourhood SCP.
//
// Runs convolution (multiply, sum) with random kernels, |sum|, maximum and
// minimum filters, binary dilation (multiply, or) and erosion (multiply,
// and), and strides of 2x1, 1x2 and 2x3, on random images with random
// source gaps and sink stalls. Header (with the rewritten FRAME size and the
// new TDEST) and pixels are compared with the reference model. A final
// frame without stalls checks the rate of one pixel per cycle.
module tb_neigh_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  always #5 clk = ~clk;

  neigh_scp #(.MAX_W(64), .MY_ID(8'd4)) dut (.*);

  `include "tb_stream.svh"

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one frame and check it; returns the cycles between the first and
  // the last output pixel.
  task automatic run_frame(int k [9], int pop, int rop, int sx, int sy, int w, int h,
                           int mode, int dest, string name, output int span);
    img_t img, exp;
    logic [31:0] hdr [$];
    int ops [] = new[13];
    int ow, oh, t0;
    for (int i = 0; i < 9; i++) ops[i] = k[i] & 8'hff;
    ops[9] = pop; ops[10] = rop; ops[11] = sx; ops[12] = sy;
    img = rand_img(w * h, mode);
    exp = ref_neigh(img, w, h, k, pop, rop, sx, sy);
    ow = (w - 3) / sx + 1;
    oh = (h - 3) / sy + 1;
    wait (in_q.size() == 0);
    push_section(T_NEIGH, 8'd5, '{1, 2}, 4'd9);     // same type, other ID
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_NEIGH, 8'd4, ops, 4'(dest));
    foreach (in_q[i]) hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME) ? w_frame(12'(ow), 12'(oh)) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size() + 1, 50000);
    t0 = cyc;
    wait_out(hdr.size() + exp.size(), 50000);
    span = cyc - t0;
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int k [9], ones [9], span;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    ones = '{1, 1, 1, 1, 1, 1, 1, 1, 1};
    for (int n = 0; n < 4; n++) begin
      foreach (k[i]) k[i] = int'($urandom % 9) - 4;
      run_frame(k, 0, 0, 1, 1, 9 + n, 7, 0, n, $sformatf("conv %0d", n), span);
    end
    foreach (k[i]) k[i] = int'($urandom % 5) - 2;
    run_frame(k, 0, 1, 1, 1, 8, 6, 0, 3, "abssum", span);
    run_frame(ones, 0, 2, 1, 1, 8, 6, 0, 4, "max", span);
    run_frame(ones, 0, 3, 1, 1, 8, 6, 0, 5, "min", span);
    run_frame(ones, 0, 5, 1, 1, 10, 8, 1, 6, "dilation", span);
    run_frame(ones, 0, 4, 1, 1, 10, 8, 1, 7, "erosion", span);
    run_frame('{0, 0, 0, 0, 1, 0, 0, 0, 0}, 1, 0, 1, 1, 6, 5, 0, 8, "add", span);
    run_frame(ones, 0, 0, 2, 1, 11, 6, 0, 9, "stride 2x1", span);
    run_frame(ones, 0, 0, 1, 2, 7, 9, 0, 10, "stride 1x2", span);
    run_frame(ones, 0, 0, 2, 3, 12, 11, 0, 11, "stride 2x3", span);
    // rate: 32 x 16 frame, no gaps or stalls. The first window completes
    // with input pixel 66 (line 2, column 2), the last with pixel 511, so
    // at one pixel per cycle the outputs span 445 cycles
    src_gap = 0;
    sink_stall = 0;
    run_frame(ones, 0, 0, 1, 1, 32, 16, 0, 1, "rate", span);
    check(span <= 511 - 66 + 3, $sformatf("rate: output span %0d cycles", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
