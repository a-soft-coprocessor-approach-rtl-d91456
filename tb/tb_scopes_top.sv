// tb_scopes_top: end-to-end test of the soft coprocessor system.
//
// The testbench plays host and camera. For every frame it writes a
// parameter header (FRAME word plus one section per SCP on the path, and
// sections of SCPs that are not on it) into the streamer, starts it, feeds
// the image with a start-of-frame flag and random gaps, and reads the
// result packet at the host output with random back-pressure. The
// dataflow graph changes from frame to frame only through the header:
//   opening      streamer -> neigh0 (dilation) -> neigh1 (erosion) -> host
//   edge+thresh  streamer -> cneigh (Sobel |Gx|+|Gy|) -> point_is (> 90) -> host
//   stride       streamer -> neigh0 (convolution, stride 2x2) -> host
//   average      streamer -> r2s (average, frame replayed) -> host
//   histogram    streamer -> r2v -> host
//   otsu         streamer -> otsu -> host
//   sobel        streamer -> sobel (fixed function) -> host
//   blocks       streamer -> block (4x4 blocks) -> host
//   open+otsu    streamer -> neigh0 (max) -> neigh1 (min) -> sobel -> otsu -> host
//   join         frame 1: streamer -> otsu -> point_ii input B;
//                frame 2: streamer -> point_ii input A (|A-B|) -> host
// Each output packet is checked word by word against the reference models
// (data and TLAST; the forwarded header by length and FRAME size). The
// mechanisms of the design are counted, most of them by watching signals
// inside the design, and each must occur: host back-pressure stalls,
// camera stalls, a change of neigh0's function between frames, sections
// of other SCPs forwarded through neigh1, windows skipped by the stride,
// pixels replayed from the R2S frame buffer, pixels of the second input
// joined by point_ii, and blocks started by the block SCP.
module tb_scopes_top;
  import scp_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cfg_we, run, pix_valid, pix_ready, pix_sof, out_valid, out_ready, r2s_result_valid;
  logic [6:0] cfg_addr;
  logic [31:0] cfg_wdata;
  logic [7:0] cfg_len;
  logic [3:0] cfg_dest;
  logic [7:0] pix_data, otsu_threshold;
  logic [15:0] frames_sent;
  logic [27:0] r2s_result;
  axis_word_t out_word;
  always #5 clk = ~clk;

  scopes_top #(.MAX_W(64), .MAX_H(64)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, stall = 30, gap = 20;
  typedef struct { logic [7:0] d; logic sof; } cam_t;
  cam_t cam_q [$];
  axis_word_t out_q [$];
  int n_out_stall = 0, n_cam_stall = 0, n_reconf = 0, n_foreign = 0, n_stride = 0;
  int n_replay = 0, n_join = 0, n_block = 0;
  logic [27:0] last_rop0 = '0;
  bit seen_rop0 = 0;

  initial begin
    repeat (400000) @(posedge clk);
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
      out_ready <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (out_valid && !out_ready) n_out_stall++;
      // internal events, observed inside the design
      if (dut.u_neigh0.u_hdr.start && dut.u_neigh0.u_hdr.cfg_ops[10] != last_rop0) begin
        if (seen_rop0) n_reconf++;
        seen_rop0 = 1;
        last_rop0 = dut.u_neigh0.u_hdr.cfg_ops[10];
      end
      if (dut.u_neigh0.w_valid && dut.u_neigh0.w_ready && !dut.u_neigh0.sel) n_stride++;
      if (dut.u_r2s.st == 3 && dut.u_r2s.c_out_valid && dut.u_r2s.c_out_ready) n_replay++;
      if (dut.u_point_ii.b_valid && dut.u_point_ii.b_ready && tag_of(dut.u_point_ii.b_word.data) == TAG_DATA) n_join++;
      if (dut.u_block.st == 1) n_block++;
      if (dut.u_neigh1.s_valid && dut.u_neigh1.s_ready && tag_of(dut.u_neigh1.s_word.data) == TAG_TYPE
          && dut.u_neigh1.s_word.data[7:0] != 8'd5) n_foreign++;
      if (pix_valid && !pix_ready) n_cam_stall++;
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
      if (out_valid && out_ready) out_q.push_back(out_word);
      out_ready <= ($urandom % 100) >= stall;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  // header under construction
  logic [31:0] hdr [$];
  task automatic sec(scp_type_e t, int id, int ops [], int dest);
    hdr.push_back(w_type(t, 8'(id)));
    foreach (ops[i]) hdr.push_back(w_op(28'(ops[i])));
    hdr.push_back(w_tdest(4'(dest)));
    hdr.push_back(w_end());
  endtask

  // Load the header, start the streamer and queue the image.
  task automatic send(int first, const ref img_t img);
    wait (cam_q.size() == 0 && !pix_valid && dut.u_streamer.st == 0);
    foreach (hdr[i]) begin
      cfg_we    <= 1'b1;
      cfg_addr  <= 7'(i);
      cfg_wdata <= hdr[i];
      @(posedge clk);
    end
    cfg_we   <= 1'b0;
    cfg_len  <= 8'(hdr.size());
    cfg_dest <= 4'(first);
    run      <= 1'b1;
    foreach (img[i]) cam_q.push_back('{d: 8'(img[i]), sof: i == 0});
    @(posedge clk);
    run <= 1'b0;
  endtask

  // Collect one packet at the host output and compare.
  task automatic receive(const ref img_t exp, input int ow, int oh, string name);
    axis_word_t w;
    int t0 = cyc, nh = 0, nd = 0, bad = 0;
    bit done = 0, frame_ok = 0;
    while (!done && cyc - t0 < 60000) begin
      @(posedge clk);
      while (out_q.size() > 0 && !done) begin
        w = out_q.pop_front();
        if (tag_of(w.data) != TAG_DATA) begin
          nh++;
          if (tag_of(w.data) == TAG_FRAME) frame_ok = (w.data == w_frame(12'(ow), 12'(oh)));
        end else begin
          if (nd >= exp.size() || w.data != w_data(28'(exp[nd])) || w.last != (nd == exp.size() - 1)) begin
            if (bad++ < 4) $display("FAIL: %s: word %0d = %h last %b, expected %0d", name, nd,
                                    w.data, w.last, nd < exp.size() ? exp[nd] : -1);
          end
          nd++;
          done = w.last;
        end
      end
    end
    check(done, $sformatf("%s: no TLAST (%0d data words)", name, nd));
    check(nh == hdr.size(), $sformatf("%s: %0d header words, expected %0d", name, nh, hdr.size()));
    check(frame_ok, $sformatf("%s: FRAME word not %0d x %0d", name, ow, oh));
    check(nd == exp.size() && bad == 0, $sformatf("%s: %0d data words, %0d wrong", name, nd, bad));
    if (bad > 0) failures += bad - 1;
    checks += nd;
  endtask

  initial begin
    img_t img, a, b, e1, exp;
    int ones [9] = '{1, 1, 1, 1, 1, 1, 1, 1, 1};
    int sob [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int k [9], kop [], sob_ops [], s, t, nb, w, h;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cfg_len = 0; cfg_dest = 0; run = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);       // histogram memories clear after reset
    w = 24;
    h = 16;

    // 1. opening: dilation then erosion on a binary image
    img = rand_img(w * h, 1);
    e1 = ref_neigh(img, w, h, ones, 0, 5, 1, 1);
    exp = ref_neigh(e1, w - 2, h - 2, ones, 0, 4, 1, 1);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_NEIGH, 4, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 5, 1, 1}, 5);
    sec(T_NEIGH, 5, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 4, 1, 1}, 0);
    sec(T_SOBEL, 9, '{}, 0);                       // not on the path
    send(4, img);
    receive(exp, w - 4, h - 4, "opening");

    // 2. Sobel by the complex neighbourhood SCP, then threshold at 90
    img = rand_img(w * h, 2);
    e1 = ref_cneigh(img, w, h, sob, 0, 1, 2, 2, 0);
    exp.delete();
    foreach (e1[i]) exp.push_back(e1[i] > 90 ? 255 : 0);
    sob_ops = new[14];
    foreach (sob[i]) sob_ops[i] = sob[i] & 255;
    sob_ops[9] = 0; sob_ops[10] = 1; sob_ops[11] = 2; sob_ops[12] = 90; sob_ops[13] = 0;
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_CNEIGH, 6, sob_ops, 1);
    sec(T_POINT_IS, 1, '{90, 9, 0, 255}, 0);
    send(6, img);
    receive(exp, w - 2, h - 2, "edge+thresh");

    // 3. neigh0 reconfigured: convolution with stride 2x2
    foreach (k[i]) k[i] = int'($urandom % 5) - 2;
    img = rand_img(w * h, 0);
    exp = ref_neigh(img, w, h, k, 0, 1, 2, 2);
    kop = new[13];
    foreach (k[i]) kop[i] = k[i] & 255;
    kop[9] = 0; kop[10] = 1; kop[11] = 2; kop[12] = 2;
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_NEIGH, 4, kop, 0);
    send(4, img);
    receive(exp, (w - 3) / 2 + 1, (h - 3) / 2 + 1, "stride");

    // 4. average with frame replay
    img = rand_img(w * h, 0);
    s = 0;
    foreach (img[i]) s += img[i];
    exp.delete();
    exp.push_back(s / (w * h));
    foreach (img[i]) exp.push_back(img[i]);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_R2S, 7, '{5, 1}, 0);
    send(7, img);
    receive(exp, w, h, "average+replay");
    check(r2s_result_valid && r2s_result == 28'(s / (w * h)), "r2s result port");

    // 5. histogram
    img = rand_img(w * h, 2);
    exp.delete();
    for (int i = 0; i < 256; i++) exp.push_back(0);
    foreach (img[i]) exp[img[i]]++;
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_R2V, 8, '{}, 0);
    send(8, img);
    receive(exp, 256, 1, "histogram");

    // 6. Otsu
    img = rand_img(w * h, 2);
    t = ref_otsu_t(img);
    exp.delete();
    foreach (img[i]) exp.push_back(img[i] > t ? 255 : 0);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_OTSU, 10, '{}, 0);
    send(10, img);
    receive(exp, w, h, "otsu");
    check(otsu_threshold == 8'(t), $sformatf("otsu threshold %0d, expected %0d", otsu_threshold, t));

    // 7. fixed-function Sobel
    img = rand_img(w * h, 2);
    exp = ref_sobel(img, w, h, 200);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_SOBEL, 9, '{}, 0);
    send(9, img);
    receive(exp, w - 2, h - 2, "sobel");

    // 8. blocks of 4 x 4 with a maximum filter inside each block
    img = rand_img(w * h, 0);
    exp.delete();
    nb = 0;
    for (int by = 0; by + 4 <= h; by += 4)
      for (int bx = 0; bx + 4 <= w; bx += 4) begin
        nb++;
        for (int y = by; y < by + 2; y++)
          for (int x = bx; x < bx + 3; x++) begin
            int m, c;
            m = 0;
            for (int i = 0; i < 9; i++) begin
              c = (x + i % 3 < w) ? x + i % 3 : w - 1;
              if (img[(y + i / 3) * w + c] > m) m = img[(y + i / 3) * w + c];
            end
            exp.push_back(m);
          end
      end
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_BLOCK, 11, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 2, 4, 4, 0, 0}, 0);
    send(11, img);
    receive(exp, 3, 2 * nb, "blocks");

    // 9. join: B = Otsu of frame 1, A = frame 2, output |A - B|
    b = rand_img(w * h, 2);
    t = ref_otsu_t(b);
    a = rand_img(w * h, 0);
    exp.delete();
    foreach (a[i]) exp.push_back(ref_point(3, a[i], b[i] > t ? 255 : 0, 0, 0));
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_OTSU, 10, '{}, 3);
    send(10, b);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_POINT_II, 2, '{3, 0, 0}, 0);
    send(2, a);
    receive(exp, w, h, "join");

    // 10. opening again after the reconfiguration of neigh0, no stalls
    stall = 0;
    gap = 0;
    img = rand_img(w * h, 1);
    e1 = ref_neigh(img, w, h, ones, 0, 5, 1, 1);
    exp = ref_neigh(e1, w - 2, h - 2, ones, 0, 4, 1, 1);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_NEIGH, 4, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 5, 1, 1}, 5);
    sec(T_NEIGH, 5, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 4, 1, 1}, 0);
    send(4, img);
    receive(exp, w - 4, h - 4, "opening again");

    // 11. the Otsu-after-opening graph: neigh0 (dilation) -> neigh1
    // (erosion) -> sobel -> otsu -> host, five SCPs in one pass
    stall = 20;
    img = rand_img(w * h, 2);
    e1 = ref_neigh(img, w, h, ones, 0, 2, 1, 1);
    a = ref_neigh(e1, w - 2, h - 2, ones, 0, 3, 1, 1);
    b = ref_sobel(a, w - 4, h - 4, 200);
    t = ref_otsu_t(b);
    exp.delete();
    foreach (b[i]) exp.push_back(b[i] > t ? 255 : 0);
    hdr.delete();
    hdr.push_back(w_frame(12'(w), 12'(h)));
    sec(T_NEIGH, 4, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 2, 1, 1}, 5);
    sec(T_NEIGH, 5, '{1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 3, 1, 1}, 9);
    sec(T_SOBEL, 9, '{}, 10);
    sec(T_OTSU, 10, '{}, 0);
    send(4, img);
    receive(exp, w - 6, h - 6, "opening-sobel-otsu");

    check(frames_sent == 16'd12, $sformatf("frames_sent = %0d", frames_sent));
    $display("mechanisms: host stalls %0d, camera stalls %0d, reconfigurations %0d, foreign sections %0d,",
             n_out_stall, n_cam_stall, n_reconf, n_foreign);
    $display("            skipped windows %0d, replayed pixels %0d, joined pixels %0d, blocks %0d",
             n_stride, n_replay, n_join, n_block);
    check(n_out_stall > 0, "no host back-pressure stall happened");
    check(n_cam_stall > 0, "no camera stall happened");
    check(n_reconf > 0, "no reconfiguration happened");
    check(n_foreign > 0, "no foreign section was forwarded");
    check(n_stride > 0, "no strided frame");
    check(n_replay > 0, "no replay");
    check(n_join > 0, "no join");
    check(n_block > 0, "no block frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
