// pano_addr: address datapath of the omnidirectional-to-panoramic conversion.
// Column a of the panorama (0 .. PANO_W-1) looks along the angle
// 2*pi*a/PANO_W; row j looks at radius r from the mirror centre (cx, cy).
// The source position is x = cx + r*cos, y = cy + r*sin.
// Set-up (`init` pulse, `busy` while running): an iterative CORDIC in
// rotation mode (16 iterations, one per clock) computes cos and sin of every
// column angle in Q1.14 and stores them in an on-chip table of PANO_W words;
// about 17*PANO_W clocks. The iteration works with 16 fraction bits and
// angles in 2^-20 turn, and rounds the result to Q1.14; the two
// half-planes outside +-90 degrees are folded by a 180 degree turn and a sign
// change.
// Per pixel (`req`, column a, radius r): the table is read, then the two
// products are formed; x_fx and y_fx (signed, 8 fraction bits, for the
// interpolation weights) appear with `out_valid` two clocks after `req`.
// The polar mapping is this design's reading of "specialized data paths for
// memory addressing"; CORDIC, table and number formats are its own choices.
module pano_addr
  import sv_pkg::*;
#(
  parameter int PANO_W = 1024   // columns (angles), a power of two
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  output logic                      busy,
  input  logic [XW-1:0]             cx,
  input  logic [YW-1:0]             cy,
  input  logic                      req,
  input  logic [$clog2(PANO_W)-1:0] a,
  input  logic [9:0]                r,
  output logic                      out_valid,
  output logic signed [20:0]        x_fx,
  output logic signed [20:0]        y_fx
);
  localparam int AW = $clog2(PANO_W);
  localparam logic signed [19:0] K_Q16 = 20'sd39797; // CORDIC gain 0.60725 in Q.16

  function automatic logic [19:0] atan_turns(input int i);
    // atan(2^-i) in units of 2^-20 turn
    case (i)
      0: return 20'd131072;  1: return 20'd77376;  2: return 20'd40884;  3: return 20'd20753;
      4: return 20'd10417;   5: return 20'd5213;   6: return 20'd2607;   7: return 20'd1304;
      8: return 20'd652;     9: return 20'd326;   10: return 20'd163;   11: return 20'd81;
      12: return 20'd41;    13: return 20'd20;    14: return 20'd10;    default: return 20'd5;
    endcase
  endfunction

  logic [31:0] tab [PANO_W];   // {cos, sin}, Q1.14 each

  // ---------------- CORDIC set-up ----------------
  logic [AW-1:0]      ia;
  logic [4:0]         it;
  logic signed [19:0] cx_r, cy_r;   // Q.16
  logic signed [19:0] z;            // angle, 2^-20 turn
  logic               neg, run;
  logic [19:0]        phase;
  logic signed [19:0] zs;
  logic               wr_tab;
  logic [AW-1:0]      wr_a;

  assign phase = 20'(ia) << (20 - AW);
  assign zs    = $signed(phase);
  assign busy  = run || wr_tab;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      ia   <= '0;
      it   <= '0;
      cx_r <= '0;
      cy_r <= '0;
      z    <= '0;
      neg  <= 1'b0;
    end else if (!run) begin
      if (init) begin
        run <= 1'b1;
        ia  <= '0;
        it  <= 5'd16;
      end
    end else if (it == 5'd16) begin
      // load the next angle, folded into -90 .. +90 degrees
      cx_r <= K_Q16;
      cy_r <= '0;
      if (zs > 20'sh40000 || zs < -20'sh40000) begin
        z   <= zs - 20'sh80000;
        neg <= 1'b1;
      end else begin
        z   <= zs;
        neg <= 1'b0;
      end
      it <= '0;
    end else begin
      if (z >= 0) begin
        cx_r <= cx_r - (cy_r >>> it);
        cy_r <= cy_r + (cx_r >>> it);
        z    <= z - $signed(atan_turns(int'(it)));
      end else begin
        cx_r <= cx_r + (cy_r >>> it);
        cy_r <= cy_r - (cx_r >>> it);
        z    <= z + $signed(atan_turns(int'(it)));
      end
      it <= it + 1'b1;
      if (it == 5'd15) begin
        it <= 5'd16;
        ia <= ia + 1'b1;
        if (ia == AW'(PANO_W - 1)) run <= 1'b0;
      end
    end
  end

  // the last iteration's result, written when the iteration counter wraps
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_tab <= 1'b0;
      wr_a   <= '0;
    end else begin
      wr_tab <= run && (it == 5'd15);
      wr_a   <= ia;
    end
  end
  logic signed [15:0] cos_w, sin_w;
  logic signed [19:0] cos_r, sin_r;   // rounded to Q1.14
  assign cos_r = (cx_r + 20'sd2) >>> 2;
  assign sin_r = (cy_r + 20'sd2) >>> 2;
  assign cos_w = neg ? -16'(cos_r) : 16'(cos_r);
  assign sin_w = neg ? -16'(sin_r) : 16'(sin_r);
  always_ff @(posedge clk) begin
    if (wr_tab) tab[wr_a] <= {cos_w, sin_w};
  end

  // ---------------- per-pixel coordinates ----------------
  logic [31:0] t_q;
  logic [9:0]  r_q;
  logic        v1;
  logic signed [26:0] px, py;
  always_ff @(posedge clk) begin
    if (req) begin
      t_q <= tab[a];
      r_q <= r;
    end
  end
  assign px = $signed({1'b0, r_q}) * $signed(t_q[31:16]);   // Q.14
  assign py = $signed({1'b0, r_q}) * $signed(t_q[15:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      x_fx      <= '0;
      y_fx      <= '0;
    end else begin
      v1        <= req;
      out_valid <= v1;
      if (v1) begin
        x_fx <= $signed({2'b0, cx, 8'b0}) + 21'(px >>> 6);
        y_fx <= $signed({3'b0, cy, 8'b0}) + 21'(py >>> 6);
      end
    end
  end

  a_no_req_during_setup: assert property (@(posedge clk) disable iff (!rst_n) req |-> !run);
endmodule
