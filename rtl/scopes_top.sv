// scopes_top: one hardware configuration of the soft coprocessor system.
//
// A pool of soft coprocessors (SCPs) hangs off one AXI-Stream interconnect.
// The streamer puts the parameter stream in front of every camera frame and
// sends the packet to the first channel of the dataflow graph; each SCP
// takes its own parameters from the header, forwards the whole header to
// the channel named in its section, and then processes the pixels. The
// graph (which SCP feeds which, with what functions) is therefore set per
// frame by the host-written header, without rebuilding the hardware; only
// the mix of SCPs below is fixed at build time.
//
// Channel map (interconnect destination = TDEST; each SCP's ID equals its
// input channel):
//   0 host output (out_*)         6 complex neighbourhood
//   1 point, image-scalar         7 global R2S (with frame buffer)
//   2 point, image-image, input A 8 global R2V (histogram)
//   3 point, image-image, input B 9 Sobel (function specific)
//   4 neighbourhood 3x3 #0       10 Otsu (function specific)
//   5 neighbourhood 3x3 #1       11 block neighbourhood
// Sources on the interconnect: 0 streamer, 1..10 the SCP outputs in the
// same order.
//
// The mix (one of each SCP class, two basic neighbourhood SCPs so that an
// opening, dilation then erosion, can be chained) and the channel numbers
// are this configuration's choice. The host processor and the camera are
// outside: the host writes the header memory through cfg_*, the camera
// delivers pixels on pix_*, and processed frames leave on out_*.
module scopes_top
  import scp_pkg::*;
#(
  parameter int unsigned MAX_W     = 640,
  parameter int unsigned MAX_H     = 512,
  parameter int unsigned HDR_DEPTH = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host: header memory and control of the streamer
  input  logic                         cfg_we,
  input  logic [$clog2(HDR_DEPTH)-1:0] cfg_addr,
  input  logic [DW-1:0]                cfg_wdata,
  input  logic [$clog2(HDR_DEPTH):0]   cfg_len,
  input  logic [DESTW-1:0]             cfg_dest,
  input  logic                         run,
  output logic [15:0]                  frames_sent,
  // camera
  input  logic                         pix_valid,
  output logic                         pix_ready,
  input  logic [7:0]                   pix_data,
  input  logic                         pix_sof,
  // results to the host
  output logic                         out_valid,
  input  logic                         out_ready,
  output axis_word_t                   out_word,
  output logic [27:0]                  r2s_result,
  output logic                         r2s_result_valid,
  output logic [7:0]                   otsu_threshold
);

  localparam int unsigned NS      = 11;
  localparam int unsigned ND      = 12;
  localparam int unsigned MAX_PIX = MAX_W * MAX_H;

  logic       s_valid [NS];
  logic       s_ready [NS];
  axis_word_t s_word  [NS];
  logic       d_valid [ND];
  logic       d_ready [ND];
  axis_word_t d_word  [ND];

  axis_switch #(.NS(NS), .ND(ND)) u_xbar (
    .clk, .rst_n,
    .s_valid, .s_ready, .s_word,
    .m_valid(d_valid), .m_ready(d_ready), .m_word(d_word));

  streamer #(.HDR_DEPTH(HDR_DEPTH)) u_streamer (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_len, .cfg_dest, .run,
    .pix_valid, .pix_ready, .pix_data, .pix_sof,
    .m_valid(s_valid[0]), .m_ready(s_ready[0]), .m_word(s_word[0]), .frames_sent);

  assign out_valid  = d_valid[0];
  assign d_ready[0] = out_ready;
  assign out_word   = d_word[0];

  point_is_scp #(.HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd1)) u_point_is (
    .clk, .rst_n,
    .s_valid(d_valid[1]), .s_ready(d_ready[1]), .s_word(d_word[1]),
    .m_valid(s_valid[1]), .m_ready(s_ready[1]), .m_word(s_word[1]));

  point_ii_scp #(.HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd2)) u_point_ii (
    .clk, .rst_n,
    .s_valid(d_valid[2]), .s_ready(d_ready[2]), .s_word(d_word[2]),
    .b_valid(d_valid[3]), .b_ready(d_ready[3]), .b_word(d_word[3]),
    .m_valid(s_valid[2]), .m_ready(s_ready[2]), .m_word(s_word[2]));

  neigh_scp #(.MAX_W(MAX_W), .HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd4)) u_neigh0 (
    .clk, .rst_n,
    .s_valid(d_valid[4]), .s_ready(d_ready[4]), .s_word(d_word[4]),
    .m_valid(s_valid[3]), .m_ready(s_ready[3]), .m_word(s_word[3]));

  neigh_scp #(.MAX_W(MAX_W), .HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd5)) u_neigh1 (
    .clk, .rst_n,
    .s_valid(d_valid[5]), .s_ready(d_ready[5]), .s_word(d_word[5]),
    .m_valid(s_valid[4]), .m_ready(s_ready[4]), .m_word(s_word[4]));

  cneigh_scp #(.MAX_W(MAX_W), .HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd6)) u_cneigh (
    .clk, .rst_n,
    .s_valid(d_valid[6]), .s_ready(d_ready[6]), .s_word(d_word[6]),
    .m_valid(s_valid[5]), .m_ready(s_ready[5]), .m_word(s_word[5]));

  global_r2s_scp #(.HDR_DEPTH(HDR_DEPTH), .FRAME_BUF(1'b1), .MAX_PIX(MAX_PIX), .MY_ID(8'd7)) u_r2s (
    .clk, .rst_n,
    .s_valid(d_valid[7]), .s_ready(d_ready[7]), .s_word(d_word[7]),
    .m_valid(s_valid[6]), .m_ready(s_ready[6]), .m_word(s_word[6]),
    .result(r2s_result), .result_valid(r2s_result_valid));

  global_r2v_scp #(.HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd8)) u_r2v (
    .clk, .rst_n,
    .s_valid(d_valid[8]), .s_ready(d_ready[8]), .s_word(d_word[8]),
    .m_valid(s_valid[7]), .m_ready(s_ready[7]), .m_word(s_word[7]));

  sobel_scp #(.MAX_W(MAX_W), .HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd9)) u_sobel (
    .clk, .rst_n,
    .s_valid(d_valid[9]), .s_ready(d_ready[9]), .s_word(d_word[9]),
    .m_valid(s_valid[8]), .m_ready(s_ready[8]), .m_word(s_word[8]));

  otsu_scp #(.HDR_DEPTH(HDR_DEPTH), .MAX_PIX(MAX_PIX), .MY_ID(8'd10)) u_otsu (
    .clk, .rst_n,
    .s_valid(d_valid[10]), .s_ready(d_ready[10]), .s_word(d_word[10]),
    .m_valid(s_valid[9]), .m_ready(s_ready[9]), .m_word(s_word[9]),
    .threshold(otsu_threshold));

  // channel 11 / source 10: block neighbourhood SCP
  block_scp #(.MAX_W(MAX_W), .HDR_DEPTH(HDR_DEPTH), .MY_ID(8'd11)) u_block (
    .clk, .rst_n,
    .s_valid(d_valid[11]), .s_ready(d_ready[11]), .s_word(d_word[11]),
    .m_valid(s_valid[10]), .m_ready(s_ready[10]), .m_word(s_word[10]));

endmodule
