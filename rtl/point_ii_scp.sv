// point_ii_scp: image-image point-operation soft coprocessor.
//
// Combines two streamed images pixel by pixel with one run-time point
// function (point_op_e), e.g. adding two edge-strength images. Stream A
// carries the parameter header that is forwarded; the header words of
// stream B (every word not tagged DATA) are accepted and dropped. In the
// data phase a pair is consumed when both streams offer a pixel. Both
// images must have the same size; the frame ends with TLAST of stream A.
//
// Parameters (OP words): 0 function (point_op_e), 1 output value when a
// relation is false, 2 output value when it is true. Arithmetic saturates
// to 0..255. How the second input is attached and how its header is
// discarded are this design's choices.
// Timing: one pixel pair per cycle, one cycle of latency.
module point_ii_scp
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128,
  parameter logic [7:0]  MY_ID     = 8'd2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  output logic       s_ready,
  input  axis_word_t s_word,
  input  logic       b_valid,
  output logic       b_ready,
  input  axis_word_t b_word,
  output logic       m_valid,
  input  logic       m_ready,
  output axis_word_t m_word
);

  localparam int unsigned MAX_OPS = 16;

  logic             c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  axis_word_t       c_in_word, c_out_word;
  logic [27:0]      ops [MAX_OPS];
  logic [4:0]       nops;
  logic             found, data_phase, start;
  logic [DESTW-1:0] dest;
  logic [11:0]      in_w, in_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_POINT_II), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w(in_w), .out_h(in_h), .data_phase, .start);

  wire b_is_data = b_valid && (tag_of(b_word.data) == TAG_DATA);

  logic       o_valid, o_last;
  logic [7:0] o_pix;
  wire        slot = !o_valid || c_out_ready;
  wire        pair = c_in_valid && b_is_data && slot;

  assign c_in_ready  = b_is_data && slot;
  assign b_ready     = (b_valid && !b_is_data) || (c_in_valid && slot);
  assign c_out_valid = o_valid;
  assign c_out_word  = '{data: w_data(28'(o_pix)), dest: dest, last: o_last};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_last  <= 1'b0;
      o_pix   <= '0;
    end else begin
      if (o_valid && c_out_ready) o_valid <= 1'b0;
      if (pair) begin
        o_valid <= 1'b1;
        o_last  <= c_in_word.last;
        o_pix   <= point_fn(point_op_e'(ops[0][3:0]), c_in_word.data[7:0], b_word.data[7:0],
                            ops[2][7:0], ops[1][7:0]);
      end
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, start, c_in_word.dest, c_in_word.data[31:8],
                  b_word.dest, b_word.last, b_word.data[27:8]};

endmodule
