// window3x3: line buffer and 3x3 window of a streamed image.
//
// Pixels arrive in raster order, one per accepted cycle. Two line buffers
// hold the previous two image lines, so together with the window registers
// the unit keeps "two lines and two pixels" of history. When the pixel at
// column >= 2 of line >= 2 arrives, the window whose bottom-right corner is
// that pixel is complete and is presented on out_win (out_win[r][c], r = 0
// top line, c = 0 left column) together with the position (out_col,
// out_row) of that corner. Positions without a full window are consumed
// without output, so a W x H image gives (W-2) x (H-2) windows, matching
// the behaviour described for the neighbourhood SCP (output starts when the
// third pixel of the third line arrives).
//
// Interface: valid/ready on both sides; start (one cycle, between frames)
// clears the position counters; width is the run-time line length
// (3..MAX_W). The output is a single register stage: in_ready is high when
// the output register is empty or being read, so the unit sustains one
// pixel per cycle. The line buffers are written as arrays with an
// asynchronous read; in an FPGA they map to distributed or block RAM.
module window3x3 #(
  parameter int unsigned MAX_W = 640
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [11:0] width,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [7:0]  in_pix,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_win [3][3],
  output logic [11:0] out_col,
  output logic [11:0] out_row
);

  localparam int CW = $clog2(MAX_W);

  logic [7:0]  lb0 [MAX_W];   // line y-1
  logic [7:0]  lb1 [MAX_W];   // line y-2
  logic [7:0]  win [3][3];
  logic [11:0] col, row;

  wire fire = in_valid && in_ready;
  assign in_ready = !out_valid || out_ready;
  assign out_win  = win;

  wire [CW-1:0] ca = col[CW-1:0];

  always_ff @(posedge clk) begin
    if (fire) begin
      lb0[ca] <= in_pix;
      lb1[ca] <= lb0[ca];
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb1[ca];
      win[1][2] <= lb0[ca];
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_col   <= '0;
      out_row   <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (start) begin
        col <= '0;
        row <= '0;
      end else if (fire) begin
        if (col >= 12'd2 && row >= 12'd2) begin
          out_valid <= 1'b1;
          out_col   <= col;
          out_row   <= row;
        end
        if (col == width - 12'd1) begin
          col <= '0;
          row <= row + 12'd1;
        end else begin
          col <= col + 12'd1;
        end
      end
    end
  end

endmodule
