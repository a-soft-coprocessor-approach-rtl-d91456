// tb_point_is_scp: self-checking test of the image-scalar point SCP.
//
// Sends frames whose header holds a foreign section (to be forwarded but
// ignored) and the SCP's own section, for several functions, with random
// source gaps and sink stalls, and compares header and pixels with the
// reference model. A final frame without stalls checks the rate of one
// pixel per cycle.
module tb_point_is_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  always #5 clk = ~clk;

  point_is_scp #(.MY_ID(8'd1)) dut (.*);

  `include "tb_stream.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int op, int sc, int vf, int vt, int w, int h, int dest);
    img_t img, exp;
    logic [31:0] hdr [$];
    int ops [] = '{sc, op, vf, vt};
    int foreign [] = '{7, 7};
    img = rand_img(w * h, 0);
    foreach (img[i]) exp.push_back(ref_point(op, img[i], sc, vt, vf));
    wait (in_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_POINT_IS, 8'd9, foreign, 4'd5);   // same type, other ID
    push_section(T_POINT_IS, 8'd1, ops, 4'(dest));
    foreach (in_q[i]) hdr.push_back(in_q[i].data);
    push_img(img);
    wait_out(hdr.size() + exp.size(), 20000);
    check_frame(hdr, 4'(dest), exp, $sformatf("op %0d", op));
  endtask

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 30;
    sink_stall = 30;
    for (int op = 0; op < 15; op++)
      run_frame(op, int'($urandom % 256), 0, 255, 7, 5, op % 16);
    run_frame(9, 90, 0, 255, 16, 9, 3);     // threshold, as PointOP(90, ">", 0, 255, 3)
    // rate: no gaps, no stalls
    src_gap = 0;
    sink_stall = 0;
    begin
      img_t img, exp;
      logic [31:0] hdr [$];
      int ops [];
      ops = '{100, 10, 0, 255};
      img = rand_img(256, 0);
      foreach (img[i]) exp.push_back(ref_point(10, img[i], 100, 255, 0));
      push_word(w_frame(12'd16, 12'd16));
      push_section(T_POINT_IS, 8'd1, ops, 4'd2);
      foreach (in_q[i]) hdr.push_back(in_q[i].data);
      push_img(img);
      wait (out_q.size() == hdr.size());
      t0 = cyc;
      wait (out_q.size() == hdr.size() + 256);
      t1 = cyc;
      check(t1 - t0 <= 256 + 3, $sformatf("256 pixels took %0d cycles", t1 - t0));
      check_frame(hdr, 4'd2, exp, "rate frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
