// point_is_scp: image-scalar point-operation soft coprocessor.
//
// Applies one point function to every pixel of the input stream and a
// scalar parameter, producing one output pixel per input pixel. The
// function is chosen at run time from the standard integer arithmetic,
// logical and relational functions (point_op_e). Arithmetic is done at
// higher precision and saturated to 0..255; a relational function outputs
// one of two run-time values, so a threshold is (">", 90) with outputs
// 0 and 255.
//
// Parameters (OP words, in order, following the textual form
// PointOP(scalar, function, false value, true value, channel)):
//   0  scalar operand, 8-bit
//   1  function (point_op_e)
//   2  output value when the relation is false
//   3  output value when the relation is true
// Image size is unchanged.
// Timing: one pixel per cycle, one cycle of latency (output register).
module point_is_scp
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128,
  parameter logic [7:0]  MY_ID     = 8'd1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  output logic       s_ready,
  input  axis_word_t s_word,
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

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_POINT_IS), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w(in_w), .out_h(in_h), .data_phase, .start);

  logic       o_valid, o_last;
  logic [7:0] o_pix;
  assign c_in_ready  = !o_valid || c_out_ready;
  assign c_out_valid = o_valid;
  assign c_out_word  = '{data: w_data(28'(o_pix)), dest: dest, last: o_last};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_last  <= 1'b0;
      o_pix   <= '0;
    end else begin
      if (o_valid && c_out_ready) o_valid <= 1'b0;
      if (c_in_valid && c_in_ready) begin
        o_valid <= 1'b1;
        o_last  <= c_in_word.last;
        o_pix   <= point_fn(point_op_e'(ops[1][3:0]), c_in_word.data[7:0], ops[0][7:0],
                            ops[3][7:0], ops[2][7:0]);
      end
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, start, c_in_word.dest, c_in_word.data[31:8]};

endmodule
