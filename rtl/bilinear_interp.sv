// bilinear_interp: pixel interpolation for the panoramic conversion.
// From the four source pixels around a non-integer position, p00 (x0,y0),
// p01 (x0+1,y0), p10 (x0,y0+1), p11 (x0+1,y0+1), and the fractional parts
// fx, fy (8 bits, 1/256 pixel) it forms
//   top = p00*(256-fx) + p01*fx        bot = p10*(256-fx) + p11*fx
//   out = (top*(256-fy) + bot*fy + 2^15) >> 16
// in two pipeline stages (horizontal, then vertical with rounding); out_valid
// follows in_valid two clocks later. Bilinear weighting is this design's
// choice of "pixel interpolation".
module bilinear_interp (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] p00,
  input  logic [7:0] p01,
  input  logic [7:0] p10,
  input  logic [7:0] p11,
  input  logic [7:0] fx,
  input  logic [7:0] fy,
  output logic       out_valid,
  output logic [7:0] out
);
  logic [15:0] top, bot;   // up to 255*256
  logic [7:0]  fy_q;
  logic        v1;
  logic [8:0]  wx0, wy0;
  logic [24:0] vsum;

  assign wx0  = 9'd256 - {1'b0, fx};
  assign wy0  = 9'd256 - {1'b0, fy_q};
  assign vsum = 25'(top) * 25'(wy0) + 25'(bot) * 25'(fy_q) + 25'd32768;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      top       <= '0;
      bot       <= '0;
      fy_q      <= '0;
      out       <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) begin
        top  <= 16'(p00 * wx0 + p01 * fx);
        bot  <= 16'(p10 * wx0 + p11 * fx);
        fy_q <= fy;
      end
      if (v1) out <= vsum[23:16];
    end
  end
endmodule
