// tb_axis_switch: self-checking test of the TDEST-routed stream switch.
//
// Four sources send packets of random length to random destinations, with
// random gaps and random back-pressure on the six destinations. Every word
// carries its source, packet number and index, so each destination checks
// that a packet arrives whole (not interleaved with another source's
// words), that packets from one source arrive in order, and that every
// packet arrives exactly once with TLAST on its last word. Contention for
// a destination (two sources ready for it at once) is counted and must
// occur. An unstalled single transfer checks one word per cycle.
module tb_axis_switch;
  import scp_pkg::*;

  localparam int NS = 4, ND = 6, NPK = 40;

  logic clk = 0, rst_n = 0;
  logic       s_valid [NS], s_ready [NS], m_valid [ND], m_ready [ND];
  axis_word_t s_word [NS], m_word [ND];
  always #5 clk = ~clk;

  axis_switch #(.NS(NS), .ND(ND)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, gap = 30, stall = 30;
  axis_word_t src_q [NS][$];
  int expect_n [ND];                  // packets sent to each destination
  int got_n [ND];
  int cur_src [ND];                   // source of the packet in progress, -1 none
  int last_pk [ND][NS];
  int contention = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // word: [27:24] source, [23:12] packet, [11:0] index
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        s_valid[s] <= 1'b0;
        s_word[s]  <= '0;
      end
      for (int d = 0; d < ND; d++) m_ready[d] <= 1'b0;
    end else begin
      cyc <= cyc + 1;
      for (int s = 0; s < NS; s++)
        if (!s_valid[s] || s_ready[s]) begin
          if (src_q[s].size() > 0 && ($urandom % 100) >= gap) begin
            s_word[s]  <= src_q[s].pop_front();
            s_valid[s] <= 1'b1;
          end else begin
            s_valid[s] <= 1'b0;
          end
        end
      for (int d = 0; d < ND; d++) begin
        int n;
        n = 0;
        for (int s = 0; s < NS; s++) if (s_valid[s] && s_word[s].dest == 4'(d)) n++;
        if (n > 1) contention++;
        if (m_valid[d] && m_ready[d]) begin
          int s, pk, ix;
          s  = int'(m_word[d].data[27:24]);
          pk = int'(m_word[d].data[23:12]);
          ix = int'(m_word[d].data[11:0]);
          checks++;
          if (m_word[d].dest != 4'(d) || (cur_src[d] >= 0 && cur_src[d] != s)
              || (ix == 0 && pk <= last_pk[d][s]) || (ix != 0 && pk != last_pk[d][s])) begin
            failures++;
            if (failures < 20) $display("FAIL: dest %0d got src %0d packet %0d word %0d", d, s, pk, ix);
          end
          last_pk[d][s] = pk;
          cur_src[d] = m_word[d].last ? -1 : s;
          if (m_word[d].last) got_n[d]++;
        end
        m_ready[d] <= ($urandom % 100) >= stall;
      end
    end
  end

  initial begin
    int t0;
    foreach (cur_src[d]) cur_src[d] = -1;
    foreach (last_pk[d, s]) last_pk[d][s] = -1;
    foreach (expect_n[d]) begin
      expect_n[d] = 0;
      got_n[d] = 0;
    end
    for (int s = 0; s < NS; s++)
      for (int p = 0; p < NPK; p++) begin
        int d, len;
        d = (p % 3 == 0) ? 1 : int'($urandom % ND);   // a hot destination
        len = 1 + int'($urandom % 12);
        expect_n[d]++;
        for (int i = 0; i < len; i++)
          src_q[s].push_back('{data: {4'h0, 4'(s), 12'(p), 12'(i)}, dest: 4'(d), last: i == len - 1});
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (src_q[0].size() == 0 && src_q[1].size() == 0 && src_q[2].size() == 0 && src_q[3].size() == 0);
    repeat (100) @(posedge clk);
    for (int d = 0; d < ND; d++)
      check(got_n[d] == expect_n[d], $sformatf("dest %0d: %0d packets, expected %0d", d, got_n[d], expect_n[d]));
    check(contention > 0, "no contention happened");
    // rate: one 64-word packet, no gaps or stalls
    gap = 0;
    stall = 0;
    for (int i = 0; i < 64; i++)
      src_q[2].push_back('{data: {4'h0, 4'd2, 12'd100, 12'(i)}, dest: 4'd3, last: i == 63});
    t0 = cyc;
    wait (got_n[3] == expect_n[3] + 1 || cyc - t0 > 1000);
    check(cyc - t0 <= 64 + 6, $sformatf("rate: 64 words took %0d cycles", cyc - t0));
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
