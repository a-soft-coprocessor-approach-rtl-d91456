// cneigh_scp: complex ("cycle") neighbourhood soft coprocessor.
//
// Applies one 3x3 kernel in several rotated orientations to the same window
// and combines the per-orientation results with a final operation, in one
// pass over the stream and with a single line buffer. Example: a Sobel edge
// detector is the horizontal-gradient kernel, two orientations 90 degrees
// apart, (multiply, |sum|) per orientation and a final sum, giving
// |Gx| + |Gy|.
//
// All MAX_ROT orientations are evaluated in parallel (nine pairwise units
// each); only the first nrot enter the final combination. A rotation by
// k * 45 degrees moves every outer kernel weight k places clockwise around
// the ring of eight outer positions; the centre stays. The step angle is
// therefore taken in multiples of 45 degrees (step/45, truncated). The
// clockwise sense and the operand layout are this design's choices.
//
// Parameters (OP words, in order):
//   0..8  kernel weights, row-major, signed 8-bit
//   9     pairwise function (pair_op_e)
//   10    per-orientation reduction (red_op_e)
//   11    number of orientations, 1..MAX_ROT (0 is taken as 1)
//   12    rotation step angle in degrees
//   13    final operation combining the orientations (red_op_e)
// Output: (W-2) x (H-2) pixels, saturated to 0..255.
// Timing: one pixel per cycle; two cycles from window completion to output.
module cneigh_scp
  import scp_pkg::*;
#(
  parameter int unsigned MAX_W     = 640,
  parameter int unsigned MAX_ROT   = 8,
  parameter int unsigned HDR_DEPTH = 128,
  parameter logic [7:0]  MY_ID     = 8'd6
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

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_CNEIGH), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w, .out_h, .data_phase, .start);

  assign out_w = in_w - 12'd2;
  assign out_h = in_h - 12'd2;

  pair_op_e    pop;
  red_op_e     rop, fop;
  logic [3:0]  nrot;
  logic [2:0]  kstep;
  always_comb begin
    pop   = pair_op_e'(ops[9][2:0]);
    rop   = red_op_e'(ops[10][2:0]);
    nrot  = (ops[11][3:0] == 4'd0) ? 4'd1 : ops[11][3:0];
    kstep = 3'((ops[12][11:0] / 12'd45) % 12'd8);
    fop   = red_op_e'(ops[13][2:0]);
  end

  logic        w_valid, w_ready;
  logic [7:0]  win [3][3];
  logic [11:0] w_col, w_row;

  window3x3 #(.MAX_W(MAX_W)) u_win (
    .clk, .rst_n, .start, .width(in_w),
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_pix(c_in_word.data[7:0]),
    .out_valid(w_valid), .out_ready(w_ready), .out_win(win), .out_col(w_col), .out_row(w_row));

  // outer ring of a 3x3 kernel, clockwise from the top-left corner
  localparam int RING [8] = '{0, 1, 2, 5, 8, 7, 6, 3};

  logic signed [7:0] kern [MAX_ROT][9];
  acc_t              inter [MAX_ROT][9];
  acc_t              part  [MAX_ROT];
  acc_t              res;
  always_comb begin
    for (int r = 0; r < int'(MAX_ROT); r++) begin
      kern[r][4] = ops[4][7:0];
      // position j receives the weight that sits r*kstep places before it
      for (int j = 0; j < 8; j++)
        kern[r][RING[j]] = ops[RING[(j + 8 * 8 - r * int'(kstep)) % 8]][7:0];
      for (int i = 0; i < 9; i++)
        inter[r][i] = pair_fn(pop, win[i / 3][i % 3], kern[r][i]);
      part[r] = reduce9(rop, inter[r]);
    end
    res = part[0];
    for (int r = 1; r < int'(MAX_ROT); r++)
      if (r < int'(nrot)) res = combine2(fop, res, part[r]);
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
        o_pix   <= sat8(res);
        o_last  <= last;
      end
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, c_in_word.dest, c_in_word.last,
                  c_in_word.data[31:8], ops[12][27:12], ops[11][27:4]};

endmodule
