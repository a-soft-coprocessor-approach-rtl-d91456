// global_r2v_scp: global reduction of an image to a vector (R2V): the
// 256-bin grey-level histogram.
//
// Each incoming pixel increments its bin (read-modify-write of a 256-entry
// memory, one pixel per cycle). After the last pixel the 256 bins are sent
// as DATA words, bin 0 first, TLAST on bin 255; each bin is cleared as it
// is read out, so the memory is ready for the next frame. After reset the
// memory is cleared in 256 cycles before the first pixel is accepted.
// Streaming the vector to the next SCP stands in for a shared memory
// holding the vector, and is this design's choice.
//
// Output: 256 x 1 words (the FRAME word is rewritten to 256 x 1).
// Timing: one pixel per cycle in; 256 cycles to send the vector.
module global_r2v_scp
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128,
  parameter int unsigned CNTW      = 20,
  parameter logic [7:0]  MY_ID     = 8'd8
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
  logic [11:0]      in_w, in_h;

  scp_header #(.HDR_DEPTH(HDR_DEPTH), .MAX_OPS(MAX_OPS), .MY_TYPE(T_R2V), .MY_ID(MY_ID)) u_hdr (
    .clk, .rst_n, .s_valid, .s_ready, .s_word, .m_valid, .m_ready, .m_word,
    .c_in_valid, .c_in_ready, .c_in_word, .c_out_valid, .c_out_ready, .c_out_word,
    .cfg_ops(ops), .cfg_nops(nops), .cfg_found(found), .cfg_dest(dest),
    .in_w, .in_h, .out_w(12'd256), .out_h(12'd1), .data_phase, .start);

  typedef enum logic [1:0] {H_CLEAR, H_ACC, H_OUT} hstate_e;
  hstate_e st;

  logic [CNTW-1:0] hist [256];
  logic [7:0]      idx;

  wire in_fire  = c_in_valid && c_in_ready;
  wire out_fire = c_out_valid && c_out_ready;
  wire [7:0] pix = c_in_word.data[7:0];

  assign c_in_ready  = (st == H_ACC);
  assign c_out_valid = (st == H_OUT);
  assign c_out_word  = '{data: w_data(28'(hist[idx])), dest: dest, last: (idx == 8'd255)};

  always_ff @(posedge clk) begin
    if (st == H_CLEAR || out_fire) hist[idx] <= '0;
    else if (in_fire)              hist[pix] <= hist[pix] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= H_CLEAR;
      idx <= '0;
    end else begin
      unique case (st)
        H_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == 8'd255) st <= H_ACC;
        end
        H_ACC: if (in_fire && c_in_word.last) begin
          st  <= H_OUT;
          idx <= '0;
        end
        H_OUT: if (out_fire) begin
          idx <= idx + 1'b1;
          if (idx == 8'd255) st <= H_ACC;
        end
        default: st <= H_ACC;
      endcase
    end
  end

  wire unused = &{1'b0, nops, found, data_phase, start, in_w, in_h, c_in_word.dest,
                  c_in_word.data[31:8], ops[0], ops[1]};

endmodule
