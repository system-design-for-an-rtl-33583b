// cpu_regs: register file on the embedded processor's bus.
// The processor configures the hardware units, reads the focus measure of
// every frame (an interrupt tells it a new one is ready), starts
// asynchronous camera commands and reaches the link chip's own registers.
// Bus: word-addressed slave, 32-bit data, no wait states; readdata is valid
// the clock after `read` (read latency 1).
//   0x00 CTRL    rw  [0] rx_en [1] tx_en [2] mode (0 filter, 1 panorama) [3] irq_en
//                    write [4]=1: start panorama table set-up (pulse)
//   0x01 STATUS  r   [0] focus ready [1] async busy [2] link access busy
//                    [3] rx in sync [4] panorama busy [5] link error (sticky)
//   0x02 FOCUS   r   last focus sum; reading clears "focus ready" and the irq
//   0x03 CHAN    rw  [5:0] receive channel, [13:8] transmit channel
//   0x04 IMG     rw  [10:0] width, [25:16] height
//   0x05 ROI_XY  rw  [10:0] x, [25:16] y     0x06 ROI_WH rw [10:0] w, [25:16] h
//   0x07 FSHIFT  rw  [3:0] filter shift      0x08..0x10 COEF0..8 rw [7:0]
//   0x11 ADEST   rw  [15:0] node ID          0x12 AOFF_HI rw [15:0]
//   0x13 AOFF_LO rw                          0x14 ADATA   w  data, sends the request
//   0x15 LCMD    w   [7:0] link address, [8] write; starts a link-chip access
//   0x16 LWDATA  rw                          0x17 LRDATA  r  data of the last link read
//   0x18 PANO_C  rw  [10:0] centre x, [25:16] centre y
//   0x19 PANO_R  rw  [9:0] inner radius
//   0x1A CNT0    r   [15:0] frames received [31:16] packets sent
//   0x1B CNT1    r   [15:0] packets skipped [31:16] async requests
//   0x1C CNT2    r   [15:0] panoramic frames [31:16] frames dropped by it
// Reset values: 640 x 480 image, 128 x 128 focus region in the centre,
// identity filter, channels 0 (in) and 1 (out). The map is this design's own.
module cpu_regs
  import sv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic [5:0]  address,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  output logic        irq,
  // to and from the units
  output cfg_t        cfg,
  input  stat_t       stat,
  output logic        pano_init,
  output logic        acmd_valid,
  output logic [15:0] acmd_dest,
  output logic [47:0] acmd_offset,
  output logic [31:0] acmd_data,
  // link_if client port for direct link-chip accesses
  output logic        lreq,
  output lreq_t       lreq_d,
  input  logic        lready,
  input  logic        ldone,
  input  logic        lerr,
  input  logic [31:0] lrdata
);
  logic [31:0] focus_q, lrdata_q;
  logic        focus_rdy, lbusy, lwait, lerr_q;

  assign irq  = focus_rdy && cfg.irq_en;
  assign lreq = lbusy && !lwait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg           <= '0;
      cfg.tx_chan   <= 6'd1;
      cfg.img_w     <= XW'(640);
      cfg.img_h     <= YW'(480);
      cfg.roi_x     <= XW'(256);
      cfg.roi_y     <= YW'(176);
      cfg.roi_w     <= XW'(128);
      cfg.roi_h     <= YW'(128);
      cfg.coef[4]   <= 8'd1;
      cfg.pano_cx   <= XW'(640);
      cfg.pano_cy   <= YW'(480);
      cfg.pano_rmin <= 10'd0;
      pano_init     <= 1'b0;
      acmd_valid    <= 1'b0;
      acmd_dest     <= '0;
      acmd_offset   <= '0;
      acmd_data     <= '0;
      lreq_d        <= '0;
      lbusy         <= 1'b0;
      lwait         <= 1'b0;
      lerr_q        <= 1'b0;
      lrdata_q      <= '0;
      focus_q       <= '0;
      focus_rdy     <= 1'b0;
      readdata      <= '0;
    end else begin
      pano_init  <= 1'b0;
      acmd_valid <= 1'b0;
      if (stat.focus_valid) begin
        focus_q   <= stat.focus;
        focus_rdy <= 1'b1;
      end
      // link access in flight
      if (lbusy && !lwait && lready) lwait <= 1'b1;
      if (lwait && ldone) begin
        lwait    <= 1'b0;
        lbusy    <= 1'b0;
        lrdata_q <= lrdata;
        if (lerr) lerr_q <= 1'b1;
      end
      if (write) begin
        case (address)
          6'h00: begin
            cfg.rx_en  <= writedata[0];
            cfg.tx_en  <= writedata[1];
            cfg.mode   <= writedata[2];
            cfg.irq_en <= writedata[3];
            pano_init  <= writedata[4];
          end
          6'h03: begin cfg.rx_chan <= writedata[5:0]; cfg.tx_chan <= writedata[13:8]; end
          6'h04: begin cfg.img_w <= writedata[10:0]; cfg.img_h <= writedata[25:16]; end
          6'h05: begin cfg.roi_x <= writedata[10:0]; cfg.roi_y <= writedata[25:16]; end
          6'h06: begin cfg.roi_w <= writedata[10:0]; cfg.roi_h <= writedata[25:16]; end
          6'h07: cfg.fshift <= writedata[3:0];
          6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F, 6'h10:
            cfg.coef[address - 6'h08] <= writedata[7:0];
          6'h11: acmd_dest <= writedata[15:0];
          6'h12: acmd_offset[47:32] <= writedata[15:0];
          6'h13: acmd_offset[31:0] <= writedata;
          6'h14: if (!stat.async_busy) begin
            acmd_data  <= writedata;
            acmd_valid <= 1'b1;
          end
          6'h15: if (!lbusy) begin
            lreq_d.addr <= writedata[7:0];
            lreq_d.wr   <= writedata[8];
            lbusy       <= 1'b1;
          end
          6'h16: lreq_d.wdata <= writedata;
          6'h18: begin cfg.pano_cx <= writedata[10:0]; cfg.pano_cy <= writedata[25:16]; end
          6'h19: cfg.pano_rmin <= writedata[9:0];
          default: ;
        endcase
      end
      if (read) begin
        case (address)
          6'h00: readdata <= {28'b0, cfg.irq_en, cfg.mode, cfg.tx_en, cfg.rx_en};
          6'h01: readdata <= {26'b0, lerr_q, stat.pano_busy, stat.rx_synced, lbusy, stat.async_busy, focus_rdy};
          6'h02: begin
            readdata <= focus_q;
            if (!stat.focus_valid) focus_rdy <= 1'b0;
          end
          6'h03: readdata <= {18'b0, cfg.tx_chan, 2'b0, cfg.rx_chan};
          6'h04: readdata <= {6'b0, cfg.img_h, 5'b0, cfg.img_w};
          6'h05: readdata <= {6'b0, cfg.roi_y, 5'b0, cfg.roi_x};
          6'h06: readdata <= {6'b0, cfg.roi_h, 5'b0, cfg.roi_w};
          6'h07: readdata <= {28'b0, cfg.fshift};
          6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F, 6'h10:
            readdata <= {24'b0, cfg.coef[address - 6'h08]};
          6'h11: readdata <= {16'b0, acmd_dest};
          6'h12: readdata <= {16'b0, acmd_offset[47:32]};
          6'h13: readdata <= acmd_offset[31:0];
          6'h16: readdata <= lreq_d.wdata;
          6'h17: readdata <= lrdata_q;
          6'h18: readdata <= {6'b0, cfg.pano_cy, 5'b0, cfg.pano_cx};
          6'h19: readdata <= {22'b0, cfg.pano_rmin};
          6'h1A: readdata <= {stat.tx_packets, stat.rx_frames};
          6'h1B: readdata <= {stat.async_reqs, stat.rx_skipped};
          6'h1C: readdata <= {stat.pano_dropped, stat.pano_frames};
          default: readdata <= '0;
        endcase
      end
    end
  end
endmodule
