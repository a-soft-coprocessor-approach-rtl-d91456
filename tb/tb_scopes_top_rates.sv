// tb_scopes_top_rates: frame rates of the basic SCP classes at full size.
//
// Runs, with the top at its default parameters, the evaluation set of the
// original design: one 512 x 512 image through each of
//   a point SCP (threshold at 128),
//   a basic 3x3 neighbourhood SCP (convolution with a random kernel),
//   the complex neighbourhood SCP (Sobel, two orientations),
//   a global SCP (sum of all pixels, result only),
// and one 640 x 480 video frame through the function-specific Sobel SCP.
// Every output is compared with the reference models; the cycle count of
// each frame (from start to the last output word, no stalls) must be one
// cycle per pixel plus the header and a few cycles of pipeline, and is
// printed with the frame rate it gives at 150 MHz.
module tb_scopes_top_rates;
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
    repeat (4000000) @(posedge clk);
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

  task automatic rate(string name, int span, int npix);
    $display("%s: %0d cycles, %0d frames/s at 150 MHz", name, span, 150000000 / span);
    check(span <= npix + 3 * hdr.size() + 20, $sformatf("%s: %0d cycles for %0d pixels", name, span, npix));
  endtask

  initial begin
    img_t img, exp;
    int sob [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int k [9], kop [], sob_ops [], span, s;
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; cfg_len = 0; cfg_dest = 0; run = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (300) @(posedge clk);

    // point: threshold
    img = rand_img(512 * 512, 0);
    foreach (img[i]) exp.push_back(img[i] > 128 ? 255 : 0);
    hdr.push_back(w_frame(12'd512, 12'd512));
    sec(T_POINT_IS, 1, '{128, 9, 0, 255}, 0);
    frame(1, img, exp, "point 512x512", span);
    rate("point 512x512", span, 512 * 512);

    // basic neighbourhood: 3x3 convolution
    foreach (k[i]) k[i] = int'($urandom % 5) - 2;
    img = rand_img(512 * 512, 0);
    exp = ref_neigh(img, 512, 512, k, 0, 1, 1, 1);
    kop = new[13];
    foreach (k[i]) kop[i] = k[i] & 255;
    kop[9] = 0; kop[10] = 1; kop[11] = 1; kop[12] = 1;
    hdr.delete();
    hdr.push_back(w_frame(12'd512, 12'd512));
    sec(T_NEIGH, 4, kop, 0);
    frame(4, img, exp, "neighbourhood 512x512", span);
    rate("neighbourhood 512x512", span, 512 * 512);

    // complex neighbourhood: Sobel
    img = rand_img(512 * 512, 2);
    exp = ref_cneigh(img, 512, 512, sob, 0, 1, 2, 2, 0);
    sob_ops = new[14];
    foreach (sob[i]) sob_ops[i] = sob[i] & 255;
    sob_ops[9] = 0; sob_ops[10] = 1; sob_ops[11] = 2; sob_ops[12] = 90; sob_ops[13] = 0;
    hdr.delete();
    hdr.push_back(w_frame(12'd512, 12'd512));
    sec(T_CNEIGH, 6, sob_ops, 0);
    frame(6, img, exp, "complex 512x512", span);
    rate("complex 512x512", span, 512 * 512);

    // global: sum
    img = rand_img(512 * 512, 0);
    s = 0;
    foreach (img[i]) s += img[i];
    exp.delete();
    exp.push_back(s);
    hdr.delete();
    hdr.push_back(w_frame(12'd512, 12'd512));
    sec(T_R2S, 7, '{0, 0}, 0);
    frame(7, img, exp, "global 512x512", span);
    rate("global 512x512", span, 512 * 512);
    check(r2s_result == 28'(s), "global result port");

    // function-specific Sobel on a video frame
    img = rand_img(640 * 480, 2);
    exp = ref_sobel(img, 640, 480, 200);
    hdr.delete();
    hdr.push_back(w_frame(12'd640, 12'd480));
    sec(T_SOBEL, 9, '{}, 0);
    frame(9, img, exp, "sobel 640x480", span);
    rate("sobel 640x480", span, 640 * 480);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
