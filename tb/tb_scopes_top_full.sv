// tb_scopes_top_full: the soft coprocessor system at its built size.
//
// The top is instantiated with every parameter at its default (640-pixel
// lines, 640 x 512 frame buffers). Two full frames are processed:
//   a 640 x 480 video frame: streamer -> complex neighbourhood SCP (Sobel,
//   |Gx| + |Gy|) -> image-scalar SCP (threshold > 90) -> host, and
//   a 512 x 512 image: streamer -> Otsu SCP -> host.
// The host output never stalls and the camera delivers one pixel per
// cycle, so the frame time must be one cycle per pixel plus the header and
// a few cycles of pipeline (plus the 256-cycle threshold sweep and the
// frame-buffer replay for Otsu). The outputs are compared with the
// reference models and the cycle counts are printed.
module tb_scopes_top_full;
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

  scopes_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { logic [7:0] d; logic sof; } cam_t;
  cam_t cam_q [$];
  axis_word_t out_q [$];

  initial begin
    repeat (3000000) @(posedge clk);
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
      if (!pix_valid || pix_ready) begin
        if (cam_q.size() > 0) begin
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
      out_ready <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] hdr [$];
  task automatic sec(scp_type_e t, int id, int ops [], int dest);
    hdr.push_back(w_type(t, 8'(id)));
    foreach (ops[i]) hdr.push_back(w_op(28'(ops[i])));
    hdr.push_back(w_tdest(4'(dest)));
    hdr.push_back(w_end());
  endtask

  // Send one frame, collect the result packet and compare; returns the
  // cycles from run to the last output word.
  task automatic frame(int first, const ref img_t img, const ref img_t exp, input string name,
                       output int span);
    axis_word_t w;
    int t0, nd = 0, bad = 0;
    bit done = 0;
    foreach (hdr[i]) begin
      cfg_we    <= 1'b1;
      cfg_addr  <= 7'(i);
      cfg_wdata <= hdr[i];
      @(posedge clk);
    end
    cfg_we   <= 1'b0;
    cfg_len  <= 8'(hdr.size());
    cfg_dest <= 4'(first);
    foreach (img[i]) cam_q.push_back('{d: 8'(img[i]), sof: i == 0});
    run <= 1'b1;
    t0 = cyc;
    @(posedge clk);
    run <= 1'b0;
    while (!done && cyc - t0 < 1500000) begin
      @(posedge clk);
      while (out_q.size() > 0 && !done) begin
        w = out_q.pop_front();
        if (tag_of(w.data) == TAG_DATA) begin
          if (nd >= exp.size() || w.data != w_data(28'(exp[nd])) || w.last != (nd == exp.size() - 1)) begin
            if (bad++ < 4) $display("FAIL: %s: word %0d = %h", name, nd, w.data);
          end
          nd++;
          done = w.last;
        end
      end
    end
    span = cyc - t0;
    check(done && nd == exp.size() && bad == 0, $sformatf("%s: %0d data words, %0d wrong", name, nd, bad));
    checks += nd;
    $display("%s: %0d cycles for %0d pixels in", name, span, img.size());
  endtask

  initial begin
    img_t img, e1, exp;
    int sob [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int sob_ops [], span, t;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cfg_len = 0; cfg_dest = 0; run = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);

    // 640 x 480 video frame: edge detection and threshold
    img = rand_img(640 * 480, 2);
    e1 = ref_cneigh(img, 640, 480, sob, 0, 1, 2, 2, 0);
    foreach (e1[i]) exp.push_back(e1[i] > 90 ? 255 : 0);
    sob_ops = new[14];
    foreach (sob[i]) sob_ops[i] = sob[i] & 255;
    sob_ops[9] = 0; sob_ops[10] = 1; sob_ops[11] = 2; sob_ops[12] = 90; sob_ops[13] = 0;
    hdr.push_back(w_frame(12'd640, 12'd480));
    sec(T_CNEIGH, 6, sob_ops, 1);
    sec(T_POINT_IS, 1, '{90, 9, 0, 255}, 0);
    frame(6, img, exp, "640x480 edges", span);
    check(span <= 640 * 480 + hdr.size() * 3 + 20, "640x480 frame slower than one pixel per cycle");

    // 512 x 512 image: Otsu thresholding through the frame buffer
    img = rand_img(512 * 512, 2);
    t = ref_otsu_t(img);
    exp.delete();
    foreach (img[i]) exp.push_back(img[i] > t ? 255 : 0);
    hdr.delete();
    hdr.push_back(w_frame(12'd512, 12'd512));
    sec(T_OTSU, 10, '{}, 0);
    frame(10, img, exp, "512x512 otsu", span);
    check(otsu_threshold == 8'(t), $sformatf("otsu threshold %0d, expected %0d", otsu_threshold, t));
    check(span <= 2 * 512 * 512 + 256 + hdr.size() * 3 + 20, "otsu frame too slow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
