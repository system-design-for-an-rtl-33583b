// laplace3x3: Laplace filter of a 3x3 window, built as an adder tree.
// The four direct neighbours of the centre are added in two levels, and
// four times the centre (a shift) is subtracted:
//   L = (N + S) + (W + E) - 4*C        range -1020 .. +1020
// The unit outputs |L| (the edge strength), the quantity whose sum over the
// focus region measures focus quality. One clock of latency; the window
// position travels alongside. The 4-neighbour kernel and the absolute value
// are this design's reading of "Laplace filter"; the adder-tree structure
// follows the design description.
module laplace3x3
  import sv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  win_t        win,
  input  wpos_t       in_pos,
  output logic        out_valid,
  output logic [9:0]  mag,
  output wpos_t       out_pos
);
  logic [8:0]        s_ns, s_we;
  logic [9:0]        s_all;
  logic signed [11:0] lap;

  always_comb begin
    s_ns  = {1'b0, win[0][1]} + {1'b0, win[2][1]};
    s_we  = {1'b0, win[1][0]} + {1'b0, win[1][2]};
    s_all = {1'b0, s_ns} + {1'b0, s_we};
    lap   = $signed({2'b00, s_all}) - $signed({2'b00, win[1][1], 2'b00});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
      out_pos   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mag     <= lap[11] ? 10'(-lap) : 10'(lap);
        out_pos <= in_pos;
      end
    end
  end
endmodule
