// axis_skid: two-entry AXI-Stream register slice.
//
// Registers both the forward path (valid, word) and the backward path
// (ready) of a stream, so that no combinational path crosses it. It holds
// up to two words: the output register and a skid register that catches
// the word arriving in the cycle the output stalls. Throughput is one word
// per cycle, latency one cycle. Used at every output of the interconnect so
// that ready chains between SCPs cannot form combinational loops.
module axis_skid
  import scp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  output logic       s_ready,
  input  axis_word_t s_word,
  output logic       m_valid,
  input  logic       m_ready,
  output axis_word_t m_word
);

  logic       main_v, skid_v;
  axis_word_t main_w, skid_w;

  assign s_ready = !skid_v;
  assign m_valid = main_v;
  assign m_word  = main_w;

  wire push = s_valid && s_ready;
  wire pop  = main_v && m_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_v <= 1'b0;
      skid_v <= 1'b0;
      main_w <= '0;
      skid_w <= '0;
    end else if (pop) begin
      if (skid_v) begin
        main_w <= skid_w;
        skid_v <= 1'b0;
      end else begin
        main_v <= push;
        if (push) main_w <= s_word;
      end
    end else if (push) begin
      if (!main_v) begin
        main_v <= 1'b1;
        main_w <= s_word;
      end else begin
        skid_v <= 1'b1;
        skid_w <= s_word;
      end
    end
  end

endmodule
