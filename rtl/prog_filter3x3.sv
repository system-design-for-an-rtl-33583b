// prog_filter3x3: programmable 3x3 digital filter in fixed point.
// Nine signed 8-bit coefficients k[r][c] weight the window taps; the
// products are summed in an adder tree, the sum is divided by 2^shift
// with an arithmetic right shift (no divider), and the result is clipped
// to the pixel range 0..255. Coefficients and shift come from processor
// registers, so one pipeline serves smoothing, sharpening or edge filters.
// Pipeline: products, then row sums, then total with shift and clip;
// out_valid follows in_valid three clocks later with the window position.
// The 3x3 size and the shift-only division follow the design description;
// the coefficient width and the clipping are this design's choices.
module prog_filter3x3
  import sv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  win_t        win,
  input  wpos_t       in_pos,
  input  logic [8:0][7:0] coef,   // coef[3*r + c], two's complement
  input  logic [3:0]  shift,
  output logic        out_valid,
  output logic [7:0]  pix,
  output wpos_t       out_pos
);
  logic signed [16:0] prod [9];
  logic signed [18:0] rsum [3];
  logic [2:0]         v;
  wpos_t              p1, p2;
  logic signed [20:0] tot, shf;

  assign tot = 21'(rsum[0]) + 21'(rsum[1]) + 21'(rsum[2]);
  assign shf = tot >>> shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v       <= '0;
      p1      <= '0;
      p2      <= '0;
      out_pos <= '0;
      pix     <= '0;
      for (int i = 0; i < 9; i++) prod[i] <= '0;
      for (int i = 0; i < 3; i++) rsum[i] <= '0;
    end else begin
      v <= {v[1:0], in_valid};
      if (in_valid) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            prod[3*r+c] <= $signed({1'b0, win[r][c]}) * $signed(coef[3*r+c]);
        p1 <= in_pos;
      end
      if (v[0]) begin
        for (int r = 0; r < 3; r++)
          rsum[r] <= 19'(prod[3*r]) + 19'(prod[3*r+1]) + 19'(prod[3*r+2]);
        p2 <= p1;
      end
      if (v[1]) begin
        if (shf < 0)        pix <= 8'd0;
        else if (shf > 255) pix <= 8'd255;
        else                pix <= shf[7:0];
        out_pos <= p2;
      end
    end
  end
  assign out_valid = v[2];
endmodule
