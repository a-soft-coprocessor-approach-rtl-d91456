// tb_window3x3: self-checking test of the 3x3 window / line-buffer unit.
//
// Streams random images of several widths with random input gaps and
// output stalls, clearing the position with start between images, and
// checks every presented window (all nine pixels and its position)
// against the image, and that exactly (W-2) x (H-2) windows appear. An
// unstalled image checks that a window leaves every cycle once the third
// line is reached.
module tb_window3x3;
  logic clk = 0, rst_n = 0;
  logic start, in_valid, in_ready, out_valid, out_ready;
  logic [11:0] width, out_col, out_row;
  logic [7:0] in_pix, out_win [3][3];
  always #5 clk = ~clk;

  window3x3 #(.MAX_W(32)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int gap = 0, stall = 0;
  int img [$];
  int pix_q [$];
  int in_idx = 0, n_win = 0, w_cur = 0, bad = 0;
  int t_first = 0, t_last = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver and checker
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid  <= 1'b0;
      in_pix    <= '0;
      out_ready <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      if (in_valid && in_ready) in_idx <= in_idx + 1;
      if (!in_valid || in_ready) begin
        if (pix_q.size() > 0 && ($urandom % 100) >= gap) begin
          in_valid <= 1'b1;
          in_pix   <= 8'(pix_q.pop_front());
        end else begin
          in_valid <= 1'b0;
        end
      end
      if (out_valid && out_ready) begin
        int x, y;
        bit ok;
        x = int'(out_col);
        y = int'(out_row);
        ok = (x >= 2 && y >= 2);
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            if (ok && out_win[r][c] != 8'(img[(y - 2 + r) * w_cur + x - 2 + c])) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          if (bad++ < 5) $display("FAIL: window at %0d,%0d wrong", x, y);
        end
        if (n_win == 0) t_first <= cyc;
        t_last <= cyc;
        n_win <= n_win + 1;
      end
      out_ready <= ($urandom % 100) >= stall;
    end
  end

  task automatic run_img(int w, int h);
    img.delete();
    for (int i = 0; i < w * h; i++) img.push_back(int'($urandom % 256));
    pix_q = img;
    w_cur = w;
    width = 12'(w);
    start = 1'b1;
    in_idx = 0;
    n_win = 0;
    @(posedge clk);
    start = 1'b0;
    while (!(in_idx == w * h && !out_valid) && cyc < 90000) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (n_win != (w - 2) * (h - 2)) begin
      failures++;
      $display("FAIL: %0d windows for %0d x %0d", n_win, w, h);
    end
  endtask

  initial begin
    start = 1'b0;
    width = 12'd8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    gap = 30;
    stall = 30;
    run_img(8, 6);
    run_img(3, 3);
    run_img(17, 5);
    run_img(32, 9);
    gap = 0;
    stall = 0;
    run_img(20, 10);
    checks++;
    if (t_last - t_first != (20 * 10 - 1) - (2 * 20 + 2)) begin
      failures++;
      $display("FAIL: rate: windows spread over %0d cycles", t_last - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
