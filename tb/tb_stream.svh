// tb_stream.svh: stream driver and collector shared by the SCP testbenches.
//
// Included inside a testbench module that declares clk, rst_n, s_valid,
// s_ready, s_word, m_valid, m_ready, m_word. Words pushed into in_q are
// offered on s_* with random idle cycles (src_gap percent); m_ready is
// dropped at random (sink_stall percent); accepted output words are
// appended to out_q. cyc counts clock cycles since reset.
axis_word_t in_q [$];
axis_word_t out_q [$];
int unsigned src_gap    = 0;
int unsigned sink_stall = 0;
int unsigned cyc        = 0;
int checks   = 0;
int failures = 0;

always @(posedge clk) begin
  if (!rst_n) begin
    s_valid <= 1'b0;
    s_word  <= '0;
    m_ready <= 1'b0;
    cyc     <= 0;
  end else begin
    cyc <= cyc + 1;
    if (!s_valid || s_ready) begin
      if (in_q.size() > 0 && ($urandom % 100) >= src_gap) begin
        s_word  <= in_q.pop_front();
        s_valid <= 1'b1;
      end else begin
        s_valid <= 1'b0;
      end
    end
    if (m_valid && m_ready) out_q.push_back(m_word);
    m_ready <= ($urandom % 100) >= sink_stall;
  end
end

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures < 20) $display("FAIL: %s", what);
  end
endtask

task automatic push_word(input logic [31:0] d, input logic last = 1'b0);
  in_q.push_back('{data: d, dest: '0, last: last});
endtask

task automatic push_img(input tb_ref_pkg::img_t img);
  foreach (img[i]) push_word(w_data(28'(img[i])), i == img.size() - 1);
endtask

task automatic push_section(input scp_type_e t, input logic [7:0] id,
                            input int ops [], input logic [3:0] dest);
  push_word(w_type(t, id));
  foreach (ops[i]) push_word(w_op(28'(ops[i])));
  push_word(w_tdest(dest));
  push_word(w_end());
endtask

// Wait until n words arrived or the time-out expires.
task automatic wait_out(input int n, input int max_cycles);
  int t0 = cyc;
  while (out_q.size() < n && cyc - t0 < max_cycles) @(posedge clk);
endtask

// Compare the collected header with the expected one (TDEST checked too),
// then the data words with img; removes them from out_q.
task automatic check_frame(input logic [31:0] hdr [$], input logic [3:0] dest,
                           input tb_ref_pkg::img_t img, input string name);
  axis_word_t w;
  int n_bad = 0;
  check(out_q.size() == hdr.size() + img.size(),
        $sformatf("%s: %0d words out, expected %0d", name, out_q.size(), hdr.size() + img.size()));
  foreach (hdr[i]) begin
    if (out_q.size() == 0) break;
    w = out_q.pop_front();
    check(w.data == hdr[i] && w.dest == dest && !w.last,
          $sformatf("%s: header word %0d = %h dest %0d, expected %h dest %0d", name, i, w.data, w.dest, hdr[i], dest));
  end
  foreach (img[i]) begin
    if (out_q.size() == 0) break;
    w = out_q.pop_front();
    checks++;
    if (w.data != w_data(28'(img[i])) || w.dest != dest || w.last != (i == img.size() - 1)) begin
      n_bad++;
      failures++;
      if (n_bad < 5) $display("FAIL: %s: data %0d = %h last %b, expected %0d", name, i, w.data, w.last, img[i]);
    end
  end
endtask
