// focus_sum: focus measure of one frame.
// Adds the Laplace magnitude of every interior window whose centre lies in
// the focus region [roi_x, roi_x+roi_w) x [roi_y, roi_y+roi_h) (the central
// part of the image). When the frame's last window arrives, the sum of the
// frame is latched in `sum`, `sum_valid` pulses for one clock, and the
// accumulator restarts for the next frame. The processor reads the value and
// runs the focus search on it. The region registers are sampled on every
// pixel, so change them between frames. The accumulator is 32 bits, far
// above the 2^20 * 1020 that a 1024 x 1024 region could reach.
module focus_sum
  import sv_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [9:0]    mag,
  input  wpos_t         pos,
  input  logic [XW-1:0] roi_x,
  input  logic [YW-1:0] roi_y,
  input  logic [XW-1:0] roi_w,
  input  logic [YW-1:0] roi_h,
  output logic [31:0]   sum,
  output logic          sum_valid
);
  logic [31:0] acc;
  logic        in_roi;
  logic [31:0] next;

  assign in_roi = pos.interior
               && ({1'b0, pos.col} >= {1'b0, roi_x}) && ({1'b0, pos.col} < ({1'b0, roi_x} + {1'b0, roi_w}))
               && ({1'b0, pos.row} >= {1'b0, roi_y}) && ({1'b0, pos.row} < ({1'b0, roi_y} + {1'b0, roi_h}));
  assign next = acc + (in_roi ? 32'(mag) : 32'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (in_valid) begin
        if (pos.eof) begin
          sum       <= next;
          sum_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= next;
        end
      end
    end
  end
endmodule
