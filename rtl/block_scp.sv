// block_scp: block-based neighbourhood soft coprocessor.
//
// Divides the image into BW x BH blocks whose origins are SX pixels apart
// horizontally and SY lines apart vertically, and applies a generic 3x3
// neighbourhood operation (pairwise function, reduction, kernel, as in
// neigh_scp) to each block separately, streaming the results block after
// block. As in the original design, the block buffer is one column wider
// than the block: every block is read out as BW+1 columns, the extra one
// being the first column to the right of the block (the last image column
// repeated when the block touches the right image edge), so the windows
// that straddle the right block boundary are computed too. Each block
// gives (BW-1) x (BH-2) output pixels.
//
// How it works: an outer stage stores input lines in a strip buffer of
// MAX_BH lines of MAX_W pixels, used circularly (line y goes to slot
// y mod MAX_BH). When the BH lines of a band of blocks are present, input
// is stalled and the blocks of the band are read out one by one, in raster
// order inside each block, into a window3x3 line buffer of width BW+1 that
// is restarted for every block; then filling resumes until the next band
// (SY lines further down) is complete. Bands may overlap (SY < BH): the
// lines they share stay in the strip. Lines that belong to no band are
// discarded. Block sizes and strides are run-time parameters, so
// different block strides can be tried without rebuilding, which the
// original asks for. The strip buffer, the stall during read-out and the
// output layout are this design's choices. MAX_BH must be a power of two.
//
// Parameters (OP words): 0..8 kernel (signed 8-bit, row-major), 9 pairwise
// function, 10 reduction, 11 BW (3..MAX_W-1), 12 BH (3..MAX_BH), 13 SX,
// 14 SY (0 means equal to the block size). Output FRAME word: width BW-1,
// height (BH-2) * number of blocks, i.e. the blocks stacked in stream
// order.
// Timing: input at one pixel per cycle while a band fills; read-out at one
// pixel per cycle, (BW+1) x BH cycles per block, plus up to four cycles
// per block (the engine drains and is restarted between blocks).
module block_scp
  import scp_pkg::*;
#(
  parameter int unsigned MAX_W     = 640,
  parameter int unsigned MAX_BH    = 16,
  parameter int unsigned HDR_DEPTH = 128,
  parameter logic [7:0]  MY_ID     = 8'd11
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
  localparam int          CW      = $clog2(MAX_W);
  localparam int          LW      = $clog2(MAX_BH);

  logic             c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  axis_word_t       c_in_word, c_out_word;
  logic [27:0]      ops [MAX_OPS];
  logic [4:0]       nops;
  logic             found, data_phase, start;
  logic [DESTW-1:0] dest;
  logic [11:0]      in_w, in_h, out_w, out_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_BLOCK), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w, .out_h, .data_phase, .start);

  pair_op_e    pop;
  red_op_e     rop;
  logic [11:0] bw, bh, sx, sy, nbx, nby;
  always_comb begin
    pop   = pair_op_e'(ops[9][2:0]);
    rop   = red_op_e'(ops[10][2:0]);
    bw    = ops[11][11:0];
    bh    = ops[12][11:0];
    sx    = (ops[13][11:0] == '0) ? bw : ops[13][11:0];
    sy    = (ops[14][11:0] == '0) ? bh : ops[14][11:0];
    nbx   = (in_w - bw) / sx + 12'd1;
    nby   = (in_h - bh) / sy + 12'd1;
    out_w = bw - 12'd1;
    out_h = 12'((bh - 12'd2) * nbx * nby);
  end

  // ------------------------------------------------------------ outer stage
  typedef enum logic [2:0] {B_FILL, B_BSTART, B_FEED, B_WAIT, B_DRAIN} bstate_e;
  bstate_e st;

  logic [7:0]  strip [MAX_BH][MAX_W];
  logic [11:0] x, y, by0, band;          // input position, band origin, band index
  logic [11:0] bk, x0, br, bc;           // block index/origin, position in block

  logic w_busy;                          // engine still holds words of a block
  wire in_fire = c_in_valid && c_in_ready;
  wire in_band = (y >= by0) && (y < by0 + bh);
  wire band_end_pix = (x == in_w - 12'd1) && (y == by0 + bh - 12'd1);

  always_ff @(posedge clk) begin
    if (in_fire && in_band)
      strip[y[LW-1:0]][x[CW-1:0]] <= c_in_word.data[7:0];
  end

  assign c_in_ready = (st == B_FILL) || (st == B_DRAIN);

  // engine feed
  logic       f_valid, f_ready, w_start;
  logic [7:0] f_pix;
  assign f_valid = (st == B_FEED);
  wire [11:0] f_line = by0 + br;
  wire [11:0] f_col  = (x0 + bc > in_w - 12'd1) ? in_w - 12'd1 : x0 + bc;
  assign f_pix   = strip[f_line[LW-1:0]][f_col[CW-1:0]];
  assign w_start = (st == B_BSTART);
  wire f_fire = f_valid && f_ready;
  wire last_band  = (band == nby - 12'd1);
  wire last_block = (bk == nbx - 12'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= B_FILL;
      x    <= '0;
      y    <= '0;
      by0  <= '0;
      band <= '0;
      bk   <= '0;
      x0   <= '0;
      br   <= '0;
      bc   <= '0;
    end else if (start) begin
      st   <= B_FILL;
      x    <= '0;
      y    <= '0;
      by0  <= '0;
      band <= '0;
    end else begin
      if (in_fire) begin
        if (x == in_w - 12'd1) begin
          x <= '0;
          y <= y + 12'd1;
        end else begin
          x <= x + 12'd1;
        end
      end
      unique case (st)
        B_FILL: if (in_fire && band_end_pix) begin
          st <= B_BSTART;
          bk <= '0;
          x0 <= '0;
        end
        B_BSTART: begin
          st <= B_FEED;
          br <= '0;
          bc <= '0;
        end
        B_FEED: if (f_fire) begin
          if (bc == bw) begin             // BW+1 columns per block line
            bc <= '0;
            br <= br + 12'd1;
            if (br == bh - 12'd1) st <= B_WAIT;
          end else begin
            bc <= bc + 12'd1;
          end
        end
        B_WAIT: if (!w_busy) begin
          if (!last_block) begin
            bk <= bk + 12'd1;
            x0 <= x0 + sx;
            st <= B_BSTART;
          end else if (!last_band) begin
            band <= band + 12'd1;
            by0  <= by0 + sy;
            st   <= B_FILL;
          end else begin
            st <= B_DRAIN;
          end
        end
        B_DRAIN: ;
        default: st <= B_FILL;
      endcase
    end
  end

  // ------------------------------------------------------- neighbourhood engine
  logic        w_valid, w_ready;
  logic [7:0]  win [3][3];
  logic [11:0] w_col, w_row;

  window3x3 #(.MAX_W(MAX_W)) u_win (
    .clk, .rst_n, .start(w_start), .width(bw + 12'd1),
    .in_valid(f_valid), .in_ready(f_ready), .in_pix(f_pix),
    .out_valid(w_valid), .out_ready(w_ready), .out_win(win), .out_col(w_col), .out_row(w_row));

  acc_t inter [9];
  acc_t res;
  always_comb begin
    for (int i = 0; i < 9; i++)
      inter[i] = pair_fn(pop, win[i / 3][i % 3], ops[i][7:0]);
    res = reduce9(rop, inter);
  end

  logic       o_valid, o_last;
  logic [7:0] o_pix;
  assign w_busy = w_valid || o_valid;
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
        o_last  <= last_band && last_block && (w_col == bw) && (w_row == bh - 12'd1);
      end
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, c_in_word.dest, c_in_word.last,
                  c_in_word.data[31:8], f_line, f_col};

endmodule
