// tb_streamer: self-checking test of the streamer (system entry point).
//
// The host writes a parameter header (FRAME word and one SCP section) and
// starts the streamer; a camera model delivers frames with a start-of-frame
// flag, preceded by stray pixels of a frame already under way, which must
// be discarded. Each output packet must be the header followed by the
// frame's pixels with TLAST on the last one and TDEST as configured. The
// header is rewritten between frames (new size, operands and channel) and
// the next packet must carry it. An unstalled frame checks one word per
// cycle.
module tb_streamer;
  import scp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we, run, pix_valid, pix_ready, pix_sof, m_valid, m_ready;
  logic [6:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic [7:0] cfg_len;
  logic [3:0] cfg_dest;
  logic [7:0] pix_data;
  logic [15:0] frames_sent;
  axis_word_t m_word;
  always #5 clk = ~clk;

  streamer #(.HDR_DEPTH(128)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, stall = 0, gap = 0;
  typedef struct { logic [7:0] d; logic sof; } cam_t;
  cam_t cam_q [$];
  axis_word_t out_q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_data  <= '0;
      pix_sof   <= 1'b0;
      m_ready   <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (!pix_valid || pix_ready) begin
        if (cam_q.size() > 0 && ($urandom % 100) >= gap) begin
          cam_t c;
          c = cam_q.pop_front();
          pix_valid <= 1'b1;
          pix_data  <= c.d;
          pix_sof   <= c.sof;
        end else begin
          pix_valid <= 1'b0;
        end
      end
      if (m_valid && m_ready) out_q.push_back(m_word);
      m_ready <= ($urandom % 100) >= stall;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic write_hdr(logic [31:0] h [$], int dest);
    foreach (h[i]) begin
      cfg_we    <= 1'b1;
      cfg_addr  <= 7'(i);
      cfg_wdata <= h[i];
      @(posedge clk);
    end
    cfg_we   <= 1'b0;
    cfg_len  <= 8'(h.size());
    cfg_dest <= 4'(dest);
    @(posedge clk);
  endtask

  task automatic run_frame(int w, int h, int nops, int dest, int stray, string name,
                           output int span);
    logic [31:0] hdr [$];
    int px [$];
    int t0;
    axis_word_t o;
    hdr.push_back(w_frame(12'(w), 12'(h)));
    hdr.push_back(w_type(T_NEIGH, 8'd4));
    for (int i = 0; i < nops; i++) hdr.push_back(w_op(28'($urandom % 256)));
    hdr.push_back(w_tdest(4'd5));
    hdr.push_back(w_end());
    wait (out_q.size() == 0 && cam_q.size() == 0 && !pix_valid);
    write_hdr(hdr, dest);
    for (int i = 0; i < stray; i++) cam_q.push_back('{d: 8'($urandom), sof: 1'b0});
    for (int i = 0; i < w * h; i++) begin
      px.push_back(int'($urandom % 256));
      cam_q.push_back('{d: 8'(px[i]), sof: i == 0});
    end
    t0 = cyc;
    run <= 1'b1;
    @(posedge clk);
    run <= 1'b0;
    while (out_q.size() < hdr.size() + w * h && cyc - t0 < 20000) @(posedge clk);
    span = cyc - t0;
    check(out_q.size() == hdr.size() + w * h, $sformatf("%s: %0d words", name, out_q.size()));
    foreach (hdr[i]) begin
      if (out_q.size() == 0) break;
      o = out_q.pop_front();
      check(o.data == hdr[i] && o.dest == 4'(dest) && !o.last, $sformatf("%s: header word %0d = %h", name, i, o.data));
    end
    foreach (px[i]) begin
      if (out_q.size() == 0) break;
      o = out_q.pop_front();
      check(o.data == w_data(28'(px[i])) && o.dest == 4'(dest) && o.last == (i == w * h - 1),
            $sformatf("%s: pixel %0d = %h last %b", name, i, o.data, o.last));
    end
  endtask

  initial begin
    int span, n0;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cfg_len = 0; cfg_dest = 0; run = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    gap = 30;
    stall = 30;
    n0 = frames_sent;
    run_frame(5, 4, 3, 1, 7, "frame 0", span);
    run_frame(9, 3, 9, 4, 0, "frame 1, new header", span);
    run_frame(4, 6, 1, 11, 3, "frame 2, new header", span);
    check(frames_sent == 16'(n0 + 3), $sformatf("frames_sent = %0d", frames_sent));
    gap = 0;
    stall = 0;
    run_frame(16, 16, 4, 2, 0, "rate", span);
    check(span <= 8 + 256 + 6, $sformatf("rate: %0d cycles for 264 words", span));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
