// global_r2s_scp: global reduction of an image to a scalar (R2S).
//
// While the frame streams in, a fully pipelined accumulator keeps the sum,
// the maximum, the minimum, the count of non-zero pixels and the pixel
// count. After the last pixel the selected result is formed (the average
// is sum / pixel count) and sent as one DATA word; it is also held on
// result / result_valid for the host. Pixels are unsigned, so |sum| equals
// sum here; it is kept as a separate function for signed data.
//
// With FRAME_BUF = 1 the SCP contains a frame buffer of MAX_PIX pixels and,
// when OP 1 is non-zero, replays the stored frame after the result word so
// that a following SCP can use the result on the same image (e.g. threshold
// at the average). The buffer is a build-time option because it costs
// memory; choosing it per frame is a run-time parameter.
//
// Parameters (OP words): 0 function (glob_op_e), 1 replay frame (0/1).
// Output: 1 x 1 (result only) or W x H (result word, then the frame; the
// FRAME word then carries W x H and the result word precedes the pixels).
// Timing: one input pixel per cycle; the result leaves two cycles after the
// last pixel (average: one combinational divide).
module global_r2s_scp
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128,
  parameter bit          FRAME_BUF = 1'b1,
  parameter int unsigned MAX_PIX   = 640 * 512,
  parameter logic [7:0]  MY_ID     = 8'd7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  output logic        s_ready,
  input  axis_word_t  s_word,
  output logic        m_valid,
  input  logic        m_ready,
  output axis_word_t  m_word,
  output logic [27:0] result,
  output logic        result_valid
);

  localparam int unsigned MAX_OPS = 4;
  localparam int          PAW     = $clog2(MAX_PIX + 1);

  logic             c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  axis_word_t       c_in_word, c_out_word;
  logic [27:0]      ops [MAX_OPS];
  logic [4:0]       nops;
  logic             found, data_phase, start;
  logic [DESTW-1:0] dest;
  logic [11:0]      in_w, in_h, out_w, out_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_R2S), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w, .out_h, .data_phase, .start);

  wire replay = FRAME_BUF && (ops[1] != '0);
  glob_op_e gop;
  assign gop   = glob_op_e'(ops[0][2:0]);
  assign out_w = replay ? in_w : 12'd1;
  assign out_h = replay ? in_h : 12'd1;

  typedef enum logic [1:0] {G_ACC, G_RES, G_OUT, G_REPLAY} gstate_e;
  gstate_e st;

  logic [27:0]    sum;
  logic [7:0]     vmax, vmin;
  logic [PAW-1:0] cnt_nz, npix, ridx;
  logic [27:0]    res_val;

  always_comb begin
    unique case (gop)
      G_SUM, G_ABSSUM: res_val = sum;
      G_MAX:           res_val = 28'(vmax);
      G_MIN:           res_val = 28'(vmin);
      G_COUNT:         res_val = 28'(cnt_nz);
      G_AVG:           res_val = (npix == '0) ? '0 : sum / 28'(npix);
      default:         res_val = '0;
    endcase
  end

  // frame buffer
  logic [7:0] fbuf [FRAME_BUF ? MAX_PIX : 1];
  wire in_fire = c_in_valid && c_in_ready;
  always_ff @(posedge clk) begin
    if (FRAME_BUF && in_fire && npix < PAW'(MAX_PIX))
      fbuf[npix[$clog2(MAX_PIX)-1:0]] <= c_in_word.data[7:0];
  end

  assign c_in_ready  = (st == G_ACC);
  assign c_out_valid = (st == G_OUT) || (st == G_REPLAY);
  always_comb begin
    c_out_word = '{data: w_data(result), dest: dest, last: !replay};
    if (st == G_REPLAY)
      c_out_word = '{data: w_data(28'(fbuf[ridx[$clog2(MAX_PIX)-1:0]])), dest: dest,
                     last: (ridx == npix - 1'b1)};
  end
  wire out_fire = c_out_valid && c_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= G_ACC;
      sum          <= '0;
      vmax         <= '0;
      vmin         <= '1;
      cnt_nz       <= '0;
      npix         <= '0;
      ridx         <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      if (start) begin
        st     <= G_ACC;
        sum    <= '0;
        vmax   <= '0;
        vmin   <= '1;
        cnt_nz <= '0;
        npix   <= '0;
      end else begin
        unique case (st)
          G_ACC: if (in_fire) begin
            sum    <= sum + 28'(c_in_word.data[7:0]);
            if (c_in_word.data[7:0] > vmax) vmax <= c_in_word.data[7:0];
            if (c_in_word.data[7:0] < vmin) vmin <= c_in_word.data[7:0];
            if (c_in_word.data[7:0] != 8'd0) cnt_nz <= cnt_nz + 1'b1;
            npix   <= npix + 1'b1;
            if (c_in_word.last) st <= G_RES;
          end
          G_RES: begin
            result       <= res_val;
            result_valid <= 1'b1;
            st           <= G_OUT;
          end
          G_OUT: if (out_fire) begin
            ridx <= '0;
            st   <= replay ? G_REPLAY : G_ACC;
          end
          G_REPLAY: if (out_fire) begin
            ridx <= ridx + 1'b1;
            if (c_out_word.last) st <= G_ACC;
          end
          default: st <= G_ACC;
        endcase
      end
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, c_in_word.dest, c_in_word.data[31:8],
                  ops[2], ops[3], ops[0][27:3]};

endmodule
