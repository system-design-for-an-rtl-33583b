// sv_pkg: shared types and constants of the vision subsystem.
// Holds the pixel stream record, the 3x3 window record, the link-chip
// register map used by the bus master and its clients, and the IEEE 1394
// transaction codes. The link-chip register offsets are this design's own
// choice (the host-interface map of the link chip is not reproduced here);
// change them in one place to match a real part.
package sv_pkg;

  localparam int PIX_W = 8;   // luma sample width (YUV 4:2:2, 8 bit per sample)
  localparam int XW    = 11;  // column coordinate, up to 2047
  localparam int YW    = 10;  // row coordinate, up to 1023

  // One luma pixel with its position in the frame.
  typedef struct packed {
    logic [PIX_W-1:0] y;
    logic [XW-1:0]    col;
    logic [YW-1:0]    row;
    logic             sof;   // first pixel of a frame
    logic             eof;   // last pixel of a frame
  } pix_t;

  // 3x3 neighbourhood; w[r][c], r = 0 is the oldest line, c = 0 the oldest column.
  typedef logic [2:0][2:0][PIX_W-1:0] win_t;

  // Position of a 3x3 window's centre pixel, carried beside the window.
  typedef struct packed {
    logic [XW-1:0] col;
    logic [YW-1:0] row;
    logic          interior; // all nine taps lie inside the frame
    logic          eof;      // window formed by the frame's last pixel
  } wpos_t;

  // Link-chip host interface: 8-bit byte address, 32-bit data.
  localparam int LA_W = 8;
  localparam logic [LA_W-1:0] LREG_GRF_CNT  = 8'h38; // quadlets waiting in the receive FIFO
  localparam logic [LA_W-1:0] LREG_ATF_FIRST = 8'h80; // async transmit FIFO, first quadlet
  localparam logic [LA_W-1:0] LREG_ATF_CONT  = 8'h84; // async transmit FIFO, next quadlet
  localparam logic [LA_W-1:0] LREG_ATF_LAST  = 8'h8C; // async transmit FIFO, last quadlet (send)
  localparam logic [LA_W-1:0] LREG_ITF_FIRST = 8'h90; // iso transmit FIFO, first quadlet
  localparam logic [LA_W-1:0] LREG_ITF_CONT  = 8'h94; // iso transmit FIFO, next quadlet
  localparam logic [LA_W-1:0] LREG_ITF_LAST  = 8'h9C; // iso transmit FIFO, last quadlet (send)
  localparam logic [LA_W-1:0] LREG_GRF_DATA  = 8'hC0; // general receive FIFO read port

  // IEEE 1394 transaction codes
  localparam logic [3:0] TCODE_WRQ = 4'h0;  // write request, quadlet
  localparam logic [3:0] TCODE_ISO = 4'hA;  // isochronous data block

  // One bus request from a client of the link-chip bus master.
  typedef struct packed {
    logic            wr;
    logic [LA_W-1:0] addr;
    logic [31:0]     wdata;
  } lreq_t;

  // Configuration written by the processor (see cpu_regs for the map).
  typedef struct packed {
    logic            rx_en;
    logic            tx_en;
    logic            mode;      // stream to host: 0 filtered image, 1 panoramic image
    logic            irq_en;
    logic [5:0]      rx_chan;
    logic [5:0]      tx_chan;
    logic [XW-1:0]   img_w;
    logic [YW-1:0]   img_h;
    logic [XW-1:0]   roi_x;
    logic [YW-1:0]   roi_y;
    logic [XW-1:0]   roi_w;
    logic [YW-1:0]   roi_h;
    logic [3:0]      fshift;
    logic [8:0][7:0] coef;
    logic [XW-1:0]   pano_cx;
    logic [YW-1:0]   pano_cy;
    logic [9:0]      pano_rmin;
  } cfg_t;

  // Status and counters read by the processor.
  typedef struct packed {
    logic [31:0] focus;
    logic        focus_valid;  // one-clock pulse with a new focus value
    logic        async_busy;
    logic        rx_synced;
    logic        pano_busy;
    logic [15:0] rx_frames;
    logic [15:0] rx_skipped;
    logic [15:0] tx_packets;
    logic [15:0] async_reqs;
    logic [15:0] pano_frames;
    logic [15:0] pano_dropped;
  } stat_t;

endpackage
