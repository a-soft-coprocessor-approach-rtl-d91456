// tb_point_ii_scp: self-checking test of the image-image point SCP.
//
// Stream A carries the header and image A, stream B its own header (to be
// dropped) and image B; the two have independent random gaps. Every point
// function is compared with the reference model; an unstalled frame checks
// one pixel pair per cycle.
module tb_point_ii_scp;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready, b_valid, b_ready;
  axis_word_t s_word, m_word, b_word;
  always #5 clk = ~clk;

  point_ii_scp #(.MY_ID(8'd2)) dut (.*);

  `include "tb_stream.svh"

  // second input stream
  axis_word_t b_q [$];
  always @(posedge clk) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_word  <= '0;
    end else if (!b_valid || b_ready) begin
      if (b_q.size() > 0 && ($urandom % 100) >= src_gap) begin
        b_word  <= b_q.pop_front();
        b_valid <= 1'b1;
      end else begin
        b_valid <= 1'b0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int op, int vf, int vt, int w, int h, int dest, string name,
                           output int span);
    img_t a, b, exp;
    logic [31:0] hdr [$];
    int t0;
    a = rand_img(w * h, 0);
    b = rand_img(w * h, op % 2);
    foreach (a[i]) exp.push_back(ref_point(op, a[i], b[i], vt, vf));
    wait (in_q.size() == 0 && b_q.size() == 0);
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_POINT_II, 8'd2, '{op, vf, vt}, 4'(dest));
    foreach (in_q[i]) hdr.push_back(in_q[i].data);
    push_img(a);
    b_q.push_back('{data: w_frame(12'(w), 12'(h)), dest: '0, last: 1'b0});
    b_q.push_back('{data: w_type(T_NEIGH, 8'd3), dest: '0, last: 1'b0});
    b_q.push_back('{data: w_end(), dest: '0, last: 1'b0});
    foreach (b[i]) b_q.push_back('{data: w_data(28'(b[i])), dest: '0, last: i == b.size() - 1});
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
    for (int op = 0; op < 15; op++) run_frame(op, 10, 200, 7, 5, op, $sformatf("op %0d", op), span);
    src_gap = 0;
    sink_stall = 0;
    run_frame(0, 0, 255, 16, 16, 1, "rate", span);
    check(span <= 255 + 3, $sformatf("rate: output span %0d cycles", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
