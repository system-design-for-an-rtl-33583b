// pano_conv: omnidirectional-to-panoramic conversion, controller and buffers.
// The omnidirectional camera's frames are too large for on-chip memory, so
// the input image buffer lives in the external SRAM (two banks, one being
// written while the other is read). Three control machines share the SRAM:
//  * the frame writer stores every incoming luma pixel at
//    {bank, row[9:0], col[10:0]} (byte address); at the end of a frame it
//    hands the bank to the converter if that is idle, otherwise the frame is
//    dropped and the bank is overwritten by the next one;
//  * the converter walks the panorama row by row (PANO_H rows of PANO_W
//    columns, row j at radius rmin + j), asks pano_addr for the source
//    position, reads the four surrounding pixels and lets bilinear_interp
//    blend them; positions outside the frame give black;
//  * the SRAM port gives the writer priority; the converter reads in the
//    clocks the writer leaves free.
// The panorama leaves as a pixel stream (out_valid/out_ready, with column,
// row and first/last flags) towards the output FIFO and the isochronous
// transmitter. `init` (re)builds pano_addr's angle table; frames arriving
// before it has finished are converted with a stale table.
// SRAM: synchronous single port, read data one clock after the address.
// The SRAM input buffer and the split into address datapath, interpolation
// and control machines follow the design description; the bank scheme,
// the pixel order and the output as a stream (rather than an SRAM output
// buffer) are this design's choices. Luma only.
module pano_conv
  import sv_pkg::*;
#(
  parameter int PANO_W = 1024,
  parameter int PANO_H = 240,
  parameter int SRAM_AW = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic [XW-1:0]       img_w,
  input  logic [YW-1:0]       img_h,
  input  logic [XW-1:0]       cx,
  input  logic [YW-1:0]       cy,
  input  logic [9:0]          rmin,
  // camera pixels
  input  logic                in_valid,
  input  pix_t                in_pix,
  // panorama pixels
  output logic                out_valid,
  output pix_t                out_pix,
  input  logic                out_ready,
  // external SRAM
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic                sram_we,
  output logic [7:0]          sram_wdata,
  input  logic [7:0]          sram_rdata,
  // status
  output logic                busy,
  output logic [15:0]         frames,
  output logic [15:0]         dropped
);
  localparam int AW  = $clog2(PANO_W);
  localparam int HW  = $clog2(PANO_H);

  // ---------------- frame writer ----------------
  logic wbank, rbank, start;
  logic conv_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank   <= 1'b0;
      rbank   <= 1'b1;
      start   <= 1'b0;
      dropped <= '0;
    end else begin
      start <= 1'b0;
      if (in_valid && in_pix.eof) begin
        if (!conv_busy && !start) begin
          rbank <= wbank;
          wbank <= ~wbank;
          start <= 1'b1;
        end else begin
          dropped <= dropped + 1'b1;
        end
      end
    end
  end

  // ---------------- converter ----------------
  typedef enum logic [2:0] {C_IDLE, C_REQ, C_ADDR, C_READ, C_INTERP, C_OUT} cstate_t;
  cstate_t cs;

  logic [AW-1:0]      ca;
  logic [HW-1:0]      cj;
  logic               a_busy, a_valid, a_req;
  logic signed [20:0] x_fx, y_fx;
  logic [XW-1:0]      x0;
  logic [YW-1:0]      y0;
  logic [7:0]         fx, fy;
  logic               in_frame;
  logic [2:0]         n_iss, n_got;
  logic               rd_pend;
  logic [1:0]         rd_idx;
  logic [7:0]         px [4];
  logic               i_valid, i_done;
  logic [7:0]         i_out;
  logic [7:0]         pix_q;
  logic               rd_slot;

  assign conv_busy = (cs != C_IDLE);
  assign busy      = conv_busy || a_busy;
  assign a_req     = (cs == C_REQ) && !a_busy;

  pano_addr #(.PANO_W(PANO_W)) u_addr (
    .clk, .rst_n, .init, .busy(a_busy), .cx, .cy,
    .req(a_req), .a(ca), .r(rmin + 10'(cj)),
    .out_valid(a_valid), .x_fx, .y_fx
  );

  bilinear_interp u_interp (
    .clk, .rst_n, .in_valid(i_valid),
    .p00(px[0]), .p01(px[1]), .p10(px[2]), .p11(px[3]),
    .fx, .fy, .out_valid(i_done), .out(i_out)
  );

  // the converter may read when the writer does not write
  assign rd_slot = (cs == C_READ) && (n_iss != 3'd4) && !in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs      <= C_IDLE;
      ca      <= '0;
      cj      <= '0;
      x0      <= '0;
      y0      <= '0;
      fx      <= '0;
      fy      <= '0;
      in_frame  <= 1'b0;
      n_iss   <= '0;
      n_got   <= '0;
      rd_pend <= 1'b0;
      rd_idx  <= '0;
      i_valid <= 1'b0;
      pix_q   <= '0;
      frames  <= '0;
      for (int k = 0; k < 4; k++) px[k] <= '0;
    end else begin
      i_valid <= 1'b0;
      rd_pend <= rd_slot;
      if (rd_slot) rd_idx <= n_iss[1:0];
      if (rd_pend) begin
        px[rd_idx] <= sram_rdata;
        n_got      <= n_got + 1'b1;
      end
      case (cs)
        C_IDLE: if (start) begin
          cs <= C_REQ;
          ca <= '0;
          cj <= '0;
        end
        C_REQ: if (a_req) cs <= C_ADDR;
        C_ADDR: if (a_valid) begin
          x0     <= XW'(x_fx >>> 8);
          y0     <= YW'(y_fx >>> 8);
          fx     <= x_fx[7:0];
          fy     <= y_fx[7:0];
          in_frame <= (x_fx >= 0) && (y_fx >= 0)
                 && ((x_fx >>> 8) < $signed({10'b0, img_w} - 21'sd1))
                 && ((y_fx >>> 8) < $signed({11'b0, img_h} - 21'sd1));
          n_iss  <= '0;
          n_got  <= '0;
          cs     <= C_READ;
        end
        C_READ: begin
          if (!in_frame) begin
            pix_q <= 8'd0;
            cs    <= C_OUT;
          end else begin
            if (rd_slot) n_iss <= n_iss + 1'b1;
            if (n_got == 3'd4) begin
              i_valid <= 1'b1;
              cs      <= C_INTERP;
            end
          end
        end
        C_INTERP: if (i_done) begin
          pix_q <= i_out;
          cs    <= C_OUT;
        end
        C_OUT: if (out_ready) begin
          if (ca == AW'(PANO_W - 1)) begin
            ca <= '0;
            if (cj == HW'(PANO_H - 1)) begin
              cj     <= '0;
              cs     <= C_IDLE;
              frames <= frames + 1'b1;
            end else begin
              cj <= cj + 1'b1;
              cs <= C_REQ;
            end
          end else begin
            ca <= ca + 1'b1;
            cs <= C_REQ;
          end
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  // SRAM port: writer first, then converter reads
  logic [XW-1:0] rx;
  logic [YW-1:0] ry;
  always_comb begin
    rx = x0 + XW'(n_iss[0]);
    ry = y0 + YW'(n_iss[1]);
    sram_we    = in_valid;
    sram_wdata = in_pix.y;
    if (in_valid) sram_addr = SRAM_AW'({wbank, in_pix.row, in_pix.col});
    else          sram_addr = SRAM_AW'({rbank, ry, rx});
  end

  assign out_valid   = (cs == C_OUT);
  assign out_pix.y   = pix_q;
  assign out_pix.col = XW'(ca);
  assign out_pix.row = YW'(cj);
  assign out_pix.sof = (ca == '0) && (cj == '0);
  assign out_pix.eof = (ca == AW'(PANO_W - 1)) && (cj == HW'(PANO_H - 1));
endmodule
