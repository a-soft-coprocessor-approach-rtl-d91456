// neigh_scp: generic 3x3 neighbourhood-operation soft coprocessor.
//
// For every 3x3 window of the input image the SCP applies a point function
// pairwise to each pixel and the matching kernel weight (first stage) and
// then reduces the nine intermediate values to one (second stage). With
// (multiply, sum) it is a convolution; with weights of 1 and (multiply, or)
// a binary dilation, with (multiply, and) an erosion. A stride lets the
// window step by more than one pixel (default 1x1). The two-stage
// structure, the function pair, the kernel and the stride as run-time
// parameters follow the design; the operand layout below, the 8-bit signed
// weights and saturation of the result to 0..255 are this design's choice.
//
// Parameters in the SCP's header section (OP words, in order):
//   0..8  kernel weights, row-major, signed 8-bit in [7:0]
//   9     pairwise function (pair_op_e)
//   10    reduction (red_op_e)
//   11    horizontal stride (0 is taken as 1)
//   12    vertical stride   (0 is taken as 1)
// Only windows lying fully inside the image are computed, so the output is
// ((W-3)/sx+1) x ((H-3)/sy+1) pixels; the forwarded FRAME word carries that
// size.
//
// Timing: one pixel per cycle in steady state; an output pixel leaves two
// cycles after the pixel that completes its window (window register, result
// register).
module neigh_scp
  import scp_pkg::*;
#(
  parameter int unsigned MAX_W     = 640,
  parameter int unsigned HDR_DEPTH = 128,
  parameter logic [7:0]  MY_ID     = 8'd4
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
  logic [11:0]      in_w, in_h, out_w, out_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_NEIGH), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w, .out_h, .data_phase, .start);

  // run-time parameters
  logic [11:0] sx, sy;
  pair_op_e    pop;
  red_op_e     rop;
  always_comb begin
    sx  = (ops[11][11:0] == 12'd0) ? 12'd1 : ops[11][11:0];
    sy  = (ops[12][11:0] == 12'd0) ? 12'd1 : ops[12][11:0];
    pop = pair_op_e'(ops[9][2:0]);
    rop = red_op_e'(ops[10][2:0]);
    out_w = (in_w - 12'd3) / sx + 12'd1;
    out_h = (in_h - 12'd3) / sy + 12'd1;
  end

  // line buffer and window
  logic        w_valid, w_ready;
  logic [7:0]  win [3][3];
  logic [11:0] w_col, w_row;

  window3x3 #(.MAX_W(MAX_W)) u_win (
    .clk, .rst_n, .start, .width(in_w),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_pix(c_in_word.data[7:0]),
    .out_valid(w_valid), .out_ready(w_ready), .out_win(win), .out_col(w_col), .out_row(w_row));

  // two-stage computation
  acc_t inter [9];
  acc_t res;
  always_comb begin
    for (int i = 0; i < 9; i++)
      inter[i] = pair_fn(pop, win[i / 3][i % 3], ops[i][7:0]);
    res = reduce9(rop, inter);
  end

  // stride selection; last = no later selected column and row exist
  wire sel  = ((w_col - 12'd2) % sx == 12'd0) && ((w_row - 12'd2) % sy == 12'd0);
  wire last = (w_col + sx > in_w - 12'd1) && (w_row + sy > in_h - 12'd1);

  logic       o_valid, o_last;
  logic [7:0] o_pix;
  assign w_ready     = !o_valid || c_out_ready;
  assign c_out_valid = o_valid;
  assign c_out_word  = '{data: w_data(28'(o_pix)), dest: dest, last: o_last};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid <= 1'b0;
      o_last  <= 1'b0;
      o_pix   <= '0;
    end else begin
      if (o_valid && c_out_ready) o_valid <= 1'b0;
      if (w_valid && w_ready && sel) begin
        o_valid <= 1'b1;
        o_pix   <= sat8(res);
        o_last  <= last;
      end
    end
  end

  // unused decoded fields
  wire unused = &{1'b0, nops, found, data_phase, c_in_word.dest, c_in_word.last, c_in_word.data[31:8]};

endmodule
