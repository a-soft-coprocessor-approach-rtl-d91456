// tb_sobel_scp: self-checking test of the fixed-function Sobel SCP.
//
// Random and bimodal images at the default threshold (200) are compared
// with a reference that forms Gx and Gy from the textbook Sobel masks.
// Random gaps and stalls; a final unstalled frame checks one pixel per
// cycle.
module tb_sobel_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  always #5 clk = ~clk;

  sobel_scp #(.MAX_W(64), .MY_ID(8'd9)) dut (.*);

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
    exp = ref_sobel(img, w, h, 200);
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_SOBEL, 8'd9, '{}, 4'(dest));
    foreach (in_q[i]) hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME) ? w_frame(12'(w - 2), 12'(h - 2)) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size() + 1, 50000);
    t0 = cyc;
    wait_out(hdr.size() + exp.size(), 50000);
    span = cyc - t0;
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    for (int n = 0; n < 6; n++) run_frame(5 + n, 9 - n / 2, n % 3, n + 1, $sformatf("frame %0d", n), span);
    src_gap = 0;
    sink_stall = 0;
    run_frame(32, 16, 2, 1, "rate", span);
    check(span <= 511 - 66 + 3, $sformatf("rate: output span %0d cycles", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
