// streamer: entry point of the SCP system.
//
// Sits between the camera capture and the interconnect. For every frame it
// sends the parameter stream held in its header memory (written by the
// host: one section per SCP plus the FRAME word) and then the frame's
// pixels as DATA words, all as one packet with TLAST on the last pixel and
// TDEST = cfg_dest, the first channel of the dataflow graph. Because the
// parameters travel in front of each frame, the host may change them
// between frames without stopping the pipeline.
//
// Host port: cfg_we/cfg_addr/cfg_wdata write header word cfg_addr;
// cfg_len is the number of header words to send; a FRAME word written to
// the memory also sets the frame size the streamer counts. run starts a
// frame whenever the streamer is idle. Camera port: pix_valid/pix_ready/
// pix_data/pix_sof, where pix_sof marks the first pixel of a frame; pixels
// before a start of frame are discarded so that frames stay aligned. The
// camera side is assumed to be buffered (the streamer may stall it).
// Timing: one header word, then one pixel, per cycle.
module streamer
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host configuration
  input  logic                         cfg_we,
  input  logic [$clog2(HDR_DEPTH)-1:0] cfg_addr,
  input  logic [DW-1:0]                cfg_wdata,
  input  logic [$clog2(HDR_DEPTH):0]   cfg_len,
  input  logic [DESTW-1:0]             cfg_dest,
  input  logic                         run,
  // camera
  input  logic                         pix_valid,
  output logic                         pix_ready,
  input  logic [7:0]                   pix_data,
  input  logic                         pix_sof,
  // stream out
  output logic                         m_valid,
  input  logic                         m_ready,
  output axis_word_t                   m_word,
  output logic [15:0]                  frames_sent
);

  typedef enum logic [1:0] {ST_IDLE, ST_HDR, ST_SYNC, ST_PIX} sstate_e;
  sstate_e st;

  logic [DW-1:0]              hmem [HDR_DEPTH];
  logic [$clog2(HDR_DEPTH):0] hidx;
  logic [11:0]                fw, fh, col, row;

  always_ff @(posedge clk) begin
    if (cfg_we) hmem[cfg_addr] <= cfg_wdata;
  end

  wire m_fire = m_valid && m_ready;
  wire plast  = (col == fw - 12'd1) && (row == fh - 12'd1);

  always_comb begin
    m_valid   = 1'b0;
    m_word    = '{data: hmem[hidx[$clog2(HDR_DEPTH)-1:0]], dest: cfg_dest, last: 1'b0};
    pix_ready = 1'b0;
    unique case (st)
      ST_HDR:  m_valid = 1'b1;
      ST_SYNC: pix_ready = !pix_sof;
      ST_PIX: begin
        m_valid   = pix_valid && (pix_sof == (col == '0 && row == '0));
        pix_ready = m_ready && m_valid;
        m_word    = '{data: w_data(28'(pix_data)), dest: cfg_dest, last: plast};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= ST_IDLE;
      hidx        <= '0;
      fw          <= 12'd3;
      fh          <= 12'd3;
      col         <= '0;
      row         <= '0;
      frames_sent <= '0;
    end else begin
      if (cfg_we && tag_of(cfg_wdata) == TAG_FRAME) begin
        fw <= cfg_wdata[27:16];
        fh <= cfg_wdata[11:0];
      end
      unique case (st)
        ST_IDLE: if (run) begin
          hidx <= '0;
          st   <= (cfg_len == '0) ? ST_SYNC : ST_HDR;
        end
        ST_HDR: if (m_fire) begin
          hidx <= hidx + 1'b1;
          if (hidx == cfg_len - 1'b1) st <= ST_SYNC;
        end
        ST_SYNC: if (pix_valid && pix_sof) begin
          st  <= ST_PIX;
          col <= '0;
          row <= '0;
        end
        ST_PIX: if (m_fire) begin
          if (col == fw - 12'd1) begin
            col <= '0;
            row <= row + 12'd1;
          end else begin
            col <= col + 12'd1;
          end
          if (plast) begin
            st          <= ST_IDLE;
            frames_sent <= frames_sent + 1'b1;
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

endmodule
