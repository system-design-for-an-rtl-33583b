// window3x3: 3x3 neighbourhood generation with on-chip line delay lines.
// Two line buffers, each MAX_W pixels deep and addressed by the column
// number, hold the two previous image lines: when a pixel of column c
// arrives, the buffers give the pixels of column c one and two lines up,
// and the new pixel and the one-line-up pixel are written back (each buffer
// reads before it writes). The three pixels of column c are shifted into a
// 3x3 register window. The window is therefore centred one column left and
// one line up of the newest pixel; `interior` is set when all nine taps lie
// in the frame (newest pixel at column >= 2 and row >= 2). Any line width
// up to MAX_W works without reconfiguration.
// Timing: in_valid may come on any clock (gaps allowed); the window for a
// pixel appears with out_valid two clocks after it. The buffers use
// registered reads so that they map onto block RAM.
module window3x3
  import sv_pkg::*;
#(
  parameter int MAX_W = 1280
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  in_pix,
  output logic  out_valid,
  output win_t  win,
  output wpos_t pos
);
  localparam int AW = $clog2(MAX_W);

  logic [PIX_W-1:0] lb1 [MAX_W];   // line above
  logic [PIX_W-1:0] lb2 [MAX_W];   // two lines above
  logic [PIX_W-1:0] up1, up2;
  logic             s1_valid;
  pix_t             s1_pix;

  // stage 1: read both delay lines at the column, write the new pixel
  always_ff @(posedge clk) begin
    if (in_valid) begin
      up1 <= lb1[in_pix.col[AW-1:0]];
      up2 <= lb2[in_pix.col[AW-1:0]];
      lb1[in_pix.col[AW-1:0]] <= in_pix.y;
    end
    // stage 2: the line-above pixel moves down to the two-lines-above buffer
    if (s1_valid) lb2[s1_pix.col[AW-1:0]] <= up1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_pix    <= '0;
      out_valid <= 1'b0;
      pos       <= '0;
      win       <= '0;
    end else begin
      s1_valid  <= in_valid;
      if (in_valid) s1_pix <= in_pix;
      out_valid <= s1_valid;
      if (s1_valid) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= s1_pix.y;
        pos.col      <= s1_pix.col - 1'b1;
        pos.row      <= s1_pix.row - 1'b1;
        pos.interior <= (s1_pix.col >= XW'(2)) && (s1_pix.row >= YW'(2));
        pos.eof      <= s1_pix.eof;
      end
    end
  end
endmodule
