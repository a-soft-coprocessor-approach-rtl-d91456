// otsu_scp: function-specific global SCP performing Otsu automatic
// thresholding.
//
// The whole frame is stored in a frame buffer while its 256-bin histogram
// and total grey-level sum are accumulated. After the last pixel the SCP
// sweeps the candidate thresholds t = 0..255, one per cycle, keeping
// running class-0 weight w0 = sum of h[0..t] and class-0 moment
// s0 = sum of i*h[i]. Otsu's criterion, the between-class variance, is
// proportional to (N*s0 - S*w0)^2 / (w0*(N-w0)) (N pixels, S grey-level
// sum); candidates are compared by cross-multiplication, so no divider is
// needed, and the first maximum wins. The stored frame is then replayed
// with every pixel above the threshold set to 255 and the rest to 0.
// The histogram bins are cleared during the sweep. After reset the
// histogram is cleared in 256 cycles.
//
// The original design names this SCP and says it holds a frame buffer; the
// histogram/sweep structure and the comparison without division are this
// design's choices. The chosen threshold is held on threshold for the host.
// No run-time operands besides the output channel. Image size unchanged.
// Timing: one pixel per cycle in, 256 cycles of sweep, one cycle to
// register the result, then one pixel per cycle out.
module otsu_scp
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128,
  parameter int unsigned MAX_PIX   = 640 * 512,
  parameter logic [7:0]  MY_ID     = 8'd10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       s_valid,
  output logic       s_ready,
  input  axis_word_t s_word,
  output logic       m_valid,
  input  logic       m_ready,
  output axis_word_t m_word,
  output logic [7:0] threshold
);

  localparam int unsigned MAX_OPS = 2;
  localparam int          PAW     = $clog2(MAX_PIX + 1);
  localparam int          FAW     = $clog2(MAX_PIX);
  localparam int          SW      = PAW + 8;          // grey-level sums
  localparam int          NW      = PAW + SW + 2;     // N*s0 - S*w0, signed
  localparam int          WW      = 2 * NW + 2 * PAW; // cross products

  logic             c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  axis_word_t       c_in_word, c_out_word;
  logic [27:0]      ops [MAX_OPS];
  logic [4:0]       nops;
  logic             found, data_phase, start;
  logic [DESTW-1:0] dest;
  logic [11:0]      in_w, in_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_OTSU), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w(in_w), .out_h(in_h), .data_phase, .start);

  typedef enum logic [2:0] {O_CLEAR, O_ACC, O_SWEEP, O_DONE, O_OUT} ostate_e;
  ostate_e st;

  logic [7:0]     fbuf [MAX_PIX];
  logic [PAW-1:0] hist [256];
  logic [7:0]     idx;
  logic [PAW-1:0] npix, ridx, w0;
  logic [SW-1:0]  ssum, s0;
  logic [WW-1:0]  best_num, best_den;
  logic [7:0]     best_t;

  wire in_fire  = c_in_valid && c_in_ready;
  wire out_fire = c_out_valid && c_out_ready;
  wire [7:0] pix = c_in_word.data[7:0];

  // candidate t = idx with the bin of idx included in class 0
  logic [PAW-1:0]        w0n;
  logic [SW-1:0]         s0n;
  logic signed [NW-1:0]  diff;
  logic [WW-1:0]         num, den;
  always_comb begin
    w0n  = w0 + hist[idx];
    s0n  = s0 + SW'(hist[idx]) * SW'(idx);
    diff = NW'(npix) * NW'(s0n) - NW'(ssum) * NW'(w0n);
    num  = WW'(diff) * WW'(diff);
    den  = WW'(w0n) * WW'(npix - w0n);
  end
  // num/den > best_num/best_den  <=>  num*best_den > best_num*den (den > 0)
  wire [2*WW-1:0] lhs = (2*WW)'(num) * (2*WW)'(best_den);
  wire [2*WW-1:0] rhs = (2*WW)'(best_num) * (2*WW)'(den);
  wire better = (den != '0) && ((best_den == '0) || (lhs > rhs));

  assign c_in_ready  = (st == O_ACC);
  assign c_out_valid = (st == O_OUT);
  assign c_out_word  = '{data: w_data((fbuf[ridx[FAW-1:0]] > threshold) ? 28'd255 : 28'd0),
                         dest: dest, last: (ridx == npix - 1'b1)};

  always_ff @(posedge clk) begin
    if (in_fire && npix < PAW'(MAX_PIX)) fbuf[npix[FAW-1:0]] <= pix;
  end

  always_ff @(posedge clk) begin
    if (st == O_CLEAR || st == O_SWEEP) hist[idx] <= '0;
    else if (in_fire)                   hist[pix] <= hist[pix] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= O_CLEAR;
      idx       <= '0;
      npix      <= '0;
      ridx      <= '0;
      ssum      <= '0;
      w0        <= '0;
      s0        <= '0;
      best_num  <= '0;
      best_den  <= '0;
      best_t    <= '0;
      threshold <= '0;
    end else begin
      unique case (st)
        O_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == 8'd255) st <= O_ACC;
        end
        O_ACC: begin
          if (start) begin
            npix <= '0;
            ssum <= '0;
          end else if (in_fire) begin
            npix <= npix + 1'b1;
            ssum <= ssum + SW'(pix);
            if (c_in_word.last) begin
              st       <= O_SWEEP;
              idx      <= '0;
              w0       <= '0;
              s0       <= '0;
              best_num <= '0;
              best_den <= '0;
              best_t   <= '0;
            end
          end
        end
        O_SWEEP: begin
          w0  <= w0n;
          s0  <= s0n;
          idx <= idx + 1'b1;
          if (better) begin
            best_num <= num;
            best_den <= den;
            best_t   <= idx;
          end
          if (idx == 8'd255) st <= O_DONE;
        end
        O_DONE: begin
          threshold <= best_t;
          ridx      <= '0;
          st        <= O_OUT;
        end
        O_OUT: if (out_fire) begin
          ridx <= ridx + 1'b1;
          if (c_out_word.last) begin
            st   <= O_ACC;
            npix <= '0;
            ssum <= '0;
          end
        end
        default: st <= O_ACC;
      endcase
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, in_w, in_h, c_in_word.dest,
                  c_in_word.data[31:8], ops[0], ops[1]};

endmodule
