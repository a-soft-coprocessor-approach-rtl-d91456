// sobel_scp: function-specific Sobel edge detector with threshold.
//
// The kind of SCP a developer builds from the 3x3 neighbourhood skeleton:
// the window handling is the generic one (window3x3), the pixel function is
// fixed. For each window it forms the horizontal and vertical Sobel
// gradients with constant coefficients (adds and one-bit shifts, no
// multipliers), adds their magnitudes and outputs 255 when the sum reaches
// THRESH (200 by default) and 0 otherwise. It takes no run-time operands
// besides its output channel.
//
// Output: (W-2) x (H-2) binary pixels (0/255).
// Timing: one pixel per cycle; two cycles from window completion to output.
module sobel_scp
  import scp_pkg::*;
#(
  parameter int unsigned MAX_W     = 640,
  parameter int unsigned HDR_DEPTH = 128,
  parameter int unsigned THRESH    = 200,
  parameter logic [7:0]  MY_ID     = 8'd9
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

  localparam int unsigned MAX_OPS = 2;

  logic             c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  axis_word_t       c_in_word, c_out_word;
  logic [27:0]      ops [MAX_OPS];
  logic [4:0]       nops;
  logic             found, data_phase, start;
  logic [DESTW-1:0] dest;
  logic [11:0]      in_w, in_h, out_w, out_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_SOBEL), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w, .out_h, .data_phase, .start);

  assign out_w = in_w - 12'd2;
  assign out_h = in_h - 12'd2;

  logic        w_valid, w_ready;
  logic [7:0]  win [3][3];
  logic [11:0] w_col, w_row;

  window3x3 #(.MAX_W(MAX_W)) u_win (
    .clk, .rst_n, .start, .width(in_w),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_pix(c_in_word.data[7:0]),
    .out_valid(w_valid), .out_ready(w_ready), .out_win(win), .out_col(w_col), .out_row(w_row));

  typedef logic signed [11:0] g_t;
  g_t gx, gy;
  logic [11:0] mag;
  always_comb begin
    gx  = g_t'(win[0][2]) - g_t'(win[0][0]) + (g_t'(win[1][2]) <<< 1) - (g_t'(win[1][0]) <<< 1)
        + g_t'(win[2][2]) - g_t'(win[2][0]);
    gy  = g_t'(win[2][0]) - g_t'(win[0][0]) + (g_t'(win[2][1]) <<< 1) - (g_t'(win[0][1]) <<< 1)
        + g_t'(win[2][2]) - g_t'(win[0][2]);
    mag = 12'((gx < 0) ? -gx : gx) + 12'((gy < 0) ? -gy : gy);
  end

  wire last = (w_col == in_w - 12'd1) && (w_row == in_h - 12'd1);

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
      if (w_valid && w_ready) begin
        o_valid <= 1'b1;
        o_pix   <= (32'(mag) >= THRESH) ? 8'd255 : 8'd0;
        o_last  <= last;
      end
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, c_in_word.dest, c_in_word.last,
                  c_in_word.data[31:8], ops[0], ops[1]};

endmodule
