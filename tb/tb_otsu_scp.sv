// tb_otsu_scp: self-checking test of the Otsu thresholding SCP.
//
// Bimodal, random and two-level images; the threshold is compared with a
// floating-point evaluation of Otsu's between-class variance (first
// maximum), and the replayed frame with the image binarised at that
// threshold (255 above it, 0 otherwise). An unstalled frame checks the
// latency of pixels in, a 256-step sweep and pixels out.
module tb_otsu_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  logic [7:0] threshold;
  always #5 clk = ~clk;

  otsu_scp #(.MAX_PIX(1024), .MY_ID(8'd10)) dut (.*);

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
    int t0, t;
    img = rand_img(w * h, mode);
    t = ref_otsu_t(img);
    foreach (img[i]) exp.push_back(img[i] > t ? 255 : 0);
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_OTSU, 8'd10, '{}, 4'(dest));
    foreach (in_q[i]) hdr.push_back(in_q[i].data);
    push_img(img);
    wait_out(hdr.size(), 50000);
    t0 = cyc;
    wait_out(hdr.size() + exp.size(), 50000);
    span = cyc - t0;
    check(threshold == 8'(t), $sformatf("%s: threshold %0d, expected %0d", name, threshold, t));
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    for (int n = 0; n < 6; n++) run_frame(8 + n, 6 + n, 2 - n % 3, n + 1, $sformatf("frame %0d", n), span);
    src_gap = 0;
    sink_stall = 0;
    run_frame(32, 32, 2, 2, "rate", span);
    check(span <= 1024 + 256 + 1024 + 8, $sformatf("rate: %0d cycles in, sweep and out", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
