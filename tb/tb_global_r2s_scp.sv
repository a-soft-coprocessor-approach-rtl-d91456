// tb_global_r2s_scp: self-checking test of the image-to-scalar reduction SCP.
//
// Every function (sum, |sum|, maximum, minimum, count of non-zero pixels,
// average) on random and binary images, with and without replay of the
// stored frame after the result word. Checks the forwarded header (FRAME
// rewritten to 1 x 1, or kept as W x H with replay), the result word, the
// replayed pixels and the result port. An unstalled frame checks that the
// reduction keeps one pixel per cycle and that the result follows within a
// few cycles.
module tb_global_r2s_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  logic [27:0] result;
  logic        result_valid;
  always #5 clk = ~clk;

  global_r2s_scp #(.MAX_PIX(1024), .MY_ID(8'd7)) dut (.*);

  `include "tb_stream.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_r2s(int fn, const ref img_t img);
    int s = 0, mx = 0, mn = 255, c = 0;
    foreach (img[i]) begin
      s += img[i];
      if (img[i] > mx) mx = img[i];
      if (img[i] < mn) mn = img[i];
      if (img[i] != 0) c++;
    end
    case (fn)
      0, 1: return s;
      2: return mx;
      3: return mn;
      4: return c;
      default: return s / img.size();
    endcase
  endfunction

  task automatic run_frame(int fn, int replay, int w, int h, int mode, int dest,
                           string name, output int span);
    img_t img, exp;
    logic [31:0] hdr [$];
    int t0, r;
    img = rand_img(w * h, mode);
    r = ref_r2s(fn, img);
    exp.push_back(r);
    if (replay) foreach (img[i]) exp.push_back(img[i]);
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_R2S, 8'd7, '{fn, replay}, 4'(dest));
    foreach (in_q[i])
      hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME && !replay) ? w_frame(12'd1, 12'd1) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size(), 50000);
    t0 = cyc;
    wait_out(hdr.size() + 1, 50000);
    span = cyc - t0;
    wait_out(hdr.size() + exp.size(), 50000);
    check(result_valid && result == 28'(r), $sformatf("%s: result port %0d, expected %0d", name, result, r));
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    for (int fn = 0; fn < 6; fn++)
      for (int rp = 0; rp < 2; rp++)
        run_frame(fn, rp, 6 + fn, 5 + rp, fn % 2, fn + 1, $sformatf("fn %0d replay %0d", fn, rp), span);
    src_gap = 0;
    sink_stall = 0;
    run_frame(5, 1, 32, 16, 0, 2, "rate", span);
    check(span <= 512 + 5, $sformatf("rate: result %0d cycles after the header", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
