// tb_cneigh_scp: self-checking test of the complex neighbourhood SCP.
//
// Configures the SCP as a Sobel gradient (horizontal-gradient kernel, two
// orientations 90 degrees apart, multiply and |sum| per orientation, final
// sum, i.e. |Gx| + |Gy|), as an eight-orientation 45-degree compass
// maximum, as a four-orientation minimum and with one orientation. The
// reference model rotates the kernel itself, one ring place per 45
// degrees. Random gaps and stalls; a final unstalled frame checks the rate
// of one pixel per cycle.
module tb_cneigh_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  always #5 clk = ~clk;

  cneigh_scp #(.MAX_W(64), .MY_ID(8'd6)) dut (.*);

  `include "tb_stream.svh"

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int k [9], int pop, int rop, int nrot, int angle, int fop,
                           int w, int h, int dest, string name, output int span);
    img_t img, exp;
    logic [31:0] hdr [$];
    int ops [] = new[14];
    int t0;
    for (int i = 0; i < 9; i++) ops[i] = k[i] & 8'hff;
    ops[9] = pop; ops[10] = rop; ops[11] = nrot; ops[12] = angle; ops[13] = fop;
    img = rand_img(w * h, 0);
    exp = ref_cneigh(img, w, h, k, pop, rop, nrot, angle / 45, fop);
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_CNEIGH, 8'd6, ops, 4'(dest));
    push_section(T_SOBEL, 8'd6, '{3}, 4'd1);          // other type, same ID
    foreach (in_q[i]) hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME) ? w_frame(12'(w - 2), 12'(h - 2)) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size() + 1, 50000);
    t0 = cyc;
    wait_out(hdr.size() + exp.size(), 50000);
    span = cyc - t0;
    check_frame(hdr, 4'(dest), exp, name);
  endtask

  initial begin
    int k [9], span;
    int sob [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 25;
    sink_stall = 25;
    run_frame(sob, 0, 1, 2, 90, 0, 9, 7, 2, "sobel", span);
    run_frame(sob, 0, 1, 2, 90, 0, 12, 5, 3, "sobel 2", span);
    foreach (k[i]) k[i] = int'($urandom % 7) - 3;
    run_frame(k, 0, 0, 8, 45, 2, 8, 6, 4, "compass max", span);
    run_frame(k, 0, 0, 4, 90, 3, 8, 6, 5, "4 x 90 min", span);
    run_frame(k, 1, 2, 3, 135, 0, 7, 7, 6, "3 x 135 add/max/sum", span);
    run_frame(k, 0, 0, 1, 0, 0, 6, 6, 7, "single", span);
    run_frame(k, 0, 0, 2, 45, 2, 9, 6, 8, "2 x 45 sum/max", span);
    run_frame(k, 0, 0, 3, 90, 0, 9, 6, 9, "3 x 90 sum/sum", span);
    src_gap = 0;
    sink_stall = 0;
    run_frame(sob, 0, 1, 2, 90, 0, 32, 16, 1, "rate", span);
    check(span <= 511 - 66 + 3, $sformatf("rate: output span %0d cycles", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
