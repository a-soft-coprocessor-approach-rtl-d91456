// scp_header: parameter-stream front end shared by every soft coprocessor.
//
// Each frame arrives as one AXI-Stream packet: a header made of one section
// per SCP (Type, OPs, TDEST, End) and then the pixel data. Every SCP sees the
// whole header, keeps the section whose TYPE word carries its own type and
// ID, and passes the complete header on before it processes the pixels.
//
// How it works: in the RECV phase the header words are stored in a small
// buffer (HDR_DEPTH words) while the own section is decoded into cfg_ops,
// cfg_nops and cfg_dest, and the FRAME word into in_w/in_h. The first word
// tagged DATA is not accepted; it ends the phase. In SEND the buffered
// header is replayed on the output with TDEST = cfg_dest, the FRAME word
// rewritten with out_w/out_h (the size of the image the core will produce).
// In DATA the input and output streams are handed to the core (c_in_*,
// c_out_*), with TDEST forced to cfg_dest, until both the last input word
// and the last output word (TLAST) have been transferred; then the next
// header is received. Storing the header before replaying it is this
// design's choice: the output channel must be known before the first word
// leaves. start pulses for one cycle when the DATA phase begins; no input
// word is handed over in that cycle, so the core can clear its counters.
//
// Timing: one header word per cycle in and out; data words pass through
// combinationally (no added latency). A header longer than HDR_DEPTH keeps
// only its first HDR_DEPTH words (the rest are dropped).
module scp_header
  import scp_pkg::*;
#(
  parameter int unsigned HDR_DEPTH = 128,
  parameter int unsigned MAX_OPS   = 16,
  parameter scp_type_e   MY_TYPE   = T_POINT_IS,
  parameter logic [7:0]  MY_ID     = 8'd1
) (
  input  logic             clk,
  input  logic             rst_n,
  // stream from the interconnect
  input  logic             s_valid,
  output logic             s_ready,
  input  axis_word_t       s_word,
  // stream to the interconnect
  output logic             m_valid,
  input  logic             m_ready,
  output axis_word_t       m_word,
  // data phase, core side
  output logic             c_in_valid,
  input  logic             c_in_ready,
  output axis_word_t       c_in_word,
  input  logic             c_out_valid,
  output logic             c_out_ready,
  input  axis_word_t       c_out_word,
  // decoded parameters
  output logic [27:0]      cfg_ops [MAX_OPS],
  output logic [4:0]       cfg_nops,
  output logic             cfg_found,
  output logic [DESTW-1:0] cfg_dest,
  output logic [11:0]      in_w,
  output logic [11:0]      in_h,
  input  logic [11:0]      out_w,
  input  logic [11:0]      out_h,
  output logic             data_phase,
  output logic             start
);

  typedef enum logic [1:0] {S_RECV, S_SEND, S_DATA} state_e;
  state_e state;

  localparam int AW = $clog2(HDR_DEPTH + 1);
  logic [DW-1:0] hbuf [HDR_DEPTH];
  logic [AW-1:0] hcnt, hidx;
  logic          in_sec;
  logic          in_done, out_done;

  wire tag_t s_tag  = tag_of(s_word.data);
  wire       s_fire = s_valid && s_ready;
  wire       m_fire = m_valid && m_ready;

  logic [DW-1:0] rd_word;
  always_comb begin
    rd_word = hbuf[hidx[$clog2(HDR_DEPTH)-1:0]];
    if (tag_of(rd_word) == TAG_FRAME) rd_word = w_frame(out_w, out_h);
  end

  always_comb begin
    s_ready     = 1'b0;
    m_valid     = 1'b0;
    m_word      = '0;
    c_in_valid  = 1'b0;
    c_in_word   = s_word;
    c_out_ready = 1'b0;
    unique case (state)
      S_RECV: s_ready = (s_tag != TAG_DATA);
      S_SEND: begin
        m_valid = (hidx < hcnt);
        m_word  = '{data: rd_word, dest: cfg_dest, last: 1'b0};
      end
      S_DATA: begin
        c_in_valid  = s_valid && !in_done && !start;
        s_ready     = c_in_ready && !in_done && !start;
        m_valid     = c_out_valid && !out_done;
        c_out_ready = m_ready && !out_done;
        m_word      = '{data: c_out_word.data, dest: cfg_dest, last: c_out_word.last};
      end
      default: ;
    endcase
  end

  assign data_phase = (state == S_DATA);

  // header buffer (no reset: only words below hcnt are read)
  always_ff @(posedge clk) begin
    if (state == S_RECV && s_fire && hcnt < AW'(HDR_DEPTH))
      hbuf[hcnt[$clog2(HDR_DEPTH)-1:0]] <= s_word.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RECV;
      hcnt      <= '0;
      hidx      <= '0;
      in_sec    <= 1'b0;
      cfg_nops  <= '0;
      cfg_found <= 1'b0;
      cfg_dest  <= '0;
      in_w      <= '0;
      in_h      <= '0;
      in_done   <= 1'b0;
      out_done  <= 1'b0;
      start     <= 1'b0;
      for (int i = 0; i < int'(MAX_OPS); i++) cfg_ops[i] <= '0;
    end else begin
      start <= 1'b0;
      unique case (state)
        S_RECV: begin
          if (s_fire) begin
            if (hcnt < AW'(HDR_DEPTH)) hcnt <= hcnt + 1'b1;
            unique case (s_tag)
              TAG_FRAME: begin
                in_w <= s_word.data[27:16];
                in_h <= s_word.data[11:0];
              end
              TAG_TYPE: begin
                in_sec <= (s_word.data[23:16] == MY_TYPE) && (s_word.data[7:0] == MY_ID);
                if ((s_word.data[23:16] == MY_TYPE) && (s_word.data[7:0] == MY_ID)) begin
                  cfg_found <= 1'b1;
                  cfg_nops  <= '0;
                end
              end
              TAG_OP: if (in_sec && cfg_nops < 5'(MAX_OPS)) begin
                cfg_ops[cfg_nops[$clog2(MAX_OPS)-1:0]] <= s_word.data[27:0];
                cfg_nops <= cfg_nops + 1'b1;
              end
              TAG_TDEST: if (in_sec) cfg_dest <= s_word.data[DESTW-1:0];
              TAG_END:   in_sec <= 1'b0;
              default: ;
            endcase
          end else if (s_valid && s_tag == TAG_DATA) begin
            state <= S_SEND;
            hidx  <= '0;
          end
        end
        S_SEND: begin
          if (hidx >= hcnt) begin
            state    <= S_DATA;
            start    <= 1'b1;
            in_done  <= 1'b0;
            out_done <= 1'b0;
          end else if (m_fire) begin
            hidx <= hidx + 1'b1;
          end
        end
        S_DATA: begin
          if (s_fire && s_word.last) in_done <= 1'b1;
          if (m_fire && m_word.last) out_done <= 1'b1;
          if ((in_done || (s_fire && s_word.last)) && (out_done || (m_fire && m_word.last))) begin
            state     <= S_RECV;
            hcnt      <= '0;
            in_sec    <= 1'b0;
            cfg_found <= 1'b0;
            cfg_dest  <= '0;
          end
        end
        default: state <= S_RECV;
      endcase
    end
  end

endmodule
