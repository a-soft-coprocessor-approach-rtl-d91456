// tb_scp_header: self-checking test of the parameter-stream front end.
//
// The header is connected to a small core in the testbench that adds one
// to every pixel through a one-word register, announces an output size of
// (W+1) x (H-1), and drives TLAST with the last input pixel. Headers mix
// foreign sections (other type, other ID) with the own section, with
// random operand counts and positions. Checked per frame: decoded operands,
// operand count, TDEST, input size, the replayed header (every word, FRAME
// rewritten to the output size, TDEST on all words), the data and TLAST,
// and the start pulse. Random gaps and stalls.
module tb_scp_header;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, m_valid, m_ready;
  axis_word_t s_word, m_word;
  logic c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  axis_word_t c_in_word, c_out_word;
  logic [27:0] cfg_ops [16];
  logic [4:0] cfg_nops;
  logic cfg_found, data_phase, start;
  logic [3:0] cfg_dest;
  logic [11:0] in_w, in_h, out_w, out_h;
  always #5 clk = ~clk;

  scp_header #(.HDR_DEPTH(64), .MAX_OPS(16), .MY_TYPE(T_NEIGH), .MY_ID(8'd4)) dut (.*);

  `include "tb_stream.svh"

  // test core: one register, pixel + 1
  logic       r_valid, r_last;
  logic [7:0] r_pix;
  int         n_start = 0;
  assign c_in_ready  = !r_valid || c_out_ready;
  assign c_out_valid = r_valid;
  assign c_out_word  = '{data: w_data(28'(r_pix)), dest: 4'd0, last: r_last};
  assign out_w = in_w + 12'd1;
  assign out_h = in_h - 12'd1;
  always @(posedge clk) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_last  <= 1'b0;
      r_pix   <= '0;
    end else begin
      if (start) n_start <= n_start + 1;
      if (r_valid && c_out_ready) r_valid <= 1'b0;
      if (c_in_valid && c_in_ready) begin
        r_valid <= 1'b1;
        r_pix   <= c_in_word.data[7:0] + 8'd1;
        r_last  <= c_in_word.last;
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

  task automatic run_frame(int n, int nops, int dest);
    img_t img, exp;
    logic [31:0] hdr [$];
    int ops [] = new[nops];
    int w, h, s0;
    w = 3 + int'($urandom % 6);
    h = 3 + int'($urandom % 5);
    foreach (ops[i]) ops[i] = int'($urandom % (1 << 28));
    img = rand_img(w * h, 0);
    foreach (img[i]) exp.push_back((img[i] + 1) % 256);
    wait (in_q.size() == 0);
    s0 = n_start;
    if (n % 2) push_section(T_NEIGH, 8'd5, '{1, 2, 3}, 4'd9);   // other ID
    push_section(T_CNEIGH, 8'd4, '{7}, 4'd8);                   // other type
    push_word(w_frame(12'(w), 12'(h)));
    push_section(T_NEIGH, 8'd4, ops, 4'(dest));
    if (n % 3) push_section(T_SOBEL, 8'd4, '{5, 6}, 4'd2);      // other type, same ID
    foreach (in_q[i])
      hdr.push_back((tag_of(in_q[i].data) == TAG_FRAME) ? w_frame(12'(w + 1), 12'(h - 1)) : in_q[i].data);
    push_img(img);
    wait_out(hdr.size() + exp.size(), 20000);
    check(cfg_nops == 5'(nops), $sformatf("frame %0d: %0d operands, expected %0d", n, cfg_nops, nops));
    foreach (ops[i]) check(cfg_ops[i] == 28'(ops[i]), $sformatf("frame %0d: operand %0d", n, i));
    check(in_w == 12'(w) && in_h == 12'(h), $sformatf("frame %0d: size %0d x %0d", n, in_w, in_h));
    check(n_start == s0 + 1, $sformatf("frame %0d: %0d start pulses", n, n_start - s0));
    check_frame(hdr, 4'(dest), exp, $sformatf("frame %0d", n));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    src_gap = 30;
    sink_stall = 30;
    for (int n = 0; n < 20; n++) run_frame(n, n % 17, int'($urandom % 16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
