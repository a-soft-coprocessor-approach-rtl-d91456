// axis_switch: AXI-Stream interconnect routing packets by TDEST.
//
// NS source ports feed ND destination ports. A source's word goes to the
// destination whose index equals its TDEST. Each destination serves one
// packet at a time: when idle it grants the lowest-numbered source that
// offers a word for it, and keeps that grant until the word with TLAST has
// passed, so the header and pixels of a frame are never interleaved with
// another frame. Because routing is by TDEST and TDEST is set by each SCP
// from its parameters, the dataflow graph changes with the parameter stream
// and not with the hardware. The design uses a vendor interconnect for this
// role; this module is a plain stand-in with the same routing function.
// Fixed priority and packet locking are this design's choices. Words whose
// TDEST is not below ND are never accepted.
//
// Every destination output passes through a register slice (axis_skid), so
// the ready of one SCP never reaches another combinationally.
// Timing: one cycle of latency, one word per cycle per destination.
module axis_switch
  import scp_pkg::*;
#(
  parameter int unsigned NS = 10,
  parameter int unsigned ND = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid [NS],
  output logic       s_ready [NS],
  input  axis_word_t s_word  [NS],
  output logic       m_valid [ND],
  input  logic       m_ready [ND],
  output axis_word_t m_word  [ND]
);

  localparam int SW = (NS > 1) ? $clog2(NS) : 1;

  logic          busy [ND];
  logic [SW-1:0] sel  [ND];
  logic [SW-1:0] cur  [ND];
  logic          have [ND];
  logic          x_valid [ND];
  logic          x_ready [ND];
  axis_word_t    x_word  [ND];

  for (genvar d = 0; d < int'(ND); d++) begin : g_slice
    axis_skid u_slice (
      .clk, .rst_n,
      .s_valid(x_valid[d]), .s_ready(x_ready[d]), .s_word(x_word[d]),
      .m_valid(m_valid[d]), .m_ready(m_ready[d]), .m_word(m_word[d]));
  end

  always_comb begin
    for (int s = 0; s < int'(NS); s++) s_ready[s] = 1'b0;
    for (int d = 0; d < int'(ND); d++) begin
      have[d] = busy[d];
      cur[d]  = sel[d];
      if (!busy[d]) begin
        for (int s = int'(NS) - 1; s >= 0; s--)
          if (s_valid[s] && 32'(s_word[s].dest) == d) begin
            have[d] = 1'b1;
            cur[d]  = SW'(s);
          end
      end
      x_valid[d] = have[d] && s_valid[cur[d]] && (32'(s_word[cur[d]].dest) == d);
      x_word[d]  = s_word[cur[d]];
      if (x_valid[d] && x_ready[d]) s_ready[cur[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(ND); d++) begin
        busy[d] <= 1'b0;
        sel[d]  <= '0;
      end
    end else begin
      for (int d = 0; d < int'(ND); d++) begin
        if (x_valid[d] && x_ready[d]) begin
          busy[d] <= !x_word[d].last;
          sel[d]  <= cur[d];
        end
      end
    end
  end

endmodule
