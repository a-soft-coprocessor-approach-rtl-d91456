// tb_global_r2v_scp: self-checking test of the histogram (image-to-vector)
// SCP.
//
// Random, binary and bimodal images of several sizes; the 256 output words
// are compared with a histogram counted by the testbench, so back-to-back
// frames also check that the bins are cleared between frames. The FRAME
// word must be rewritten to 256 x 1. An unstalled frame checks one pixel
// per cycle in and one bin per cycle out.
module tb_global_r2v_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  always #5 clk = ~clk;

  global_r2v_scp #(.MY_ID(8'd8)) dut (.*);

  `include "tb_stream.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int w, int h, int mode, int dest, string name, output int span);
    img_t img, exp;
    logic [31:0] hdr [$];
    int t0;
    img = rand_img(w * h, mode);
    for (int i = 0; i < 256; i++) exp.push_back(0);
    foreach (img[i]) exp[img[i]]++;
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_R2V, 8'd8, '{}, 4'(dest));
    foreach (in_q[i])
      hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME) ? w_frame(12'd256, 12'd1) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size(), 50000);
    t0 = cyc;
    wait_out(hdr.size() + 256, 50000);
    span = cyc - t0;
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    for (int n = 0; n < 5; n++) run_frame(7 + 3 * n, 5 + n, n % 3, n, $sformatf("frame %0d", n), span);
    src_gap = 0;
    sink_stall = 0;
    run_frame(32, 32, 0, 3, "rate", span);
    check(span <= 1024 + 256 + 6, $sformatf("rate: %0d cycles for 1024 pixels and 256 bins", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
