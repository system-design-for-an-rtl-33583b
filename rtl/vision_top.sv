// vision_top: autonomous vision subsystem between FireWire cameras and the
// robot's host PC.
// Data path: the link chip's receive FIFO is drained by iso_rx, which
// synchronises to the camera's frames and emits luma pixels into the input
// FIFO. From there every pixel feeds
//   * the focus pipeline: window3x3 (line delay lines) -> laplace3x3
//     (adder tree) -> focus_sum over the central region; the processor is
//     interrupted with each frame's focus value and answers with
//     asynchronous focus commands through async_tx;
//   * the programmable 3x3 filter (prog_filter3x3), whose interior pixels
//     go to the output FIFO in mode 0;
//   * the panoramic converter (pano_conv, with its SRAM input buffer),
//     whose output goes to the output FIFO in mode 1.
// iso_tx sends the output FIFO's pixels as an isochronous stream. All link
// accesses (0 iso_rx, 1 iso_tx, 2 async_tx, 3 processor) go through the
// single link_if bus master. The embedded processor, link chip, SRAM, PHY
// and clock circuitry are outside; their connections are the ports.
// Flow control: the input FIFO is popped only while the output FIFO has room
// for the pixels still in the filter pipeline (mode 0); in mode 1 it is
// popped at once, since the converter's writer never waits. When the input
// FIFO is full iso_rx stops reading and the link chip's FIFO holds the data.
// One clock (the 30 MHz board clock shared with the link chip) runs all.
module vision_top
  import sv_pkg::*;
#(
  parameter int MAX_W     = 1280,  // longest image line (omnidirectional camera)
  parameter int IN_DEPTH  = 64,
  parameter int OUT_DEPTH = 512,
  parameter int PKT_Q     = 160,
  parameter int PANO_W    = 1024,
  parameter int PANO_H    = 240,
  parameter int SRAM_AW   = 22
) (
  input  logic               clk,
  input  logic               rst_n,
  // embedded processor bus
  input  logic [5:0]         cpu_address,
  input  logic               cpu_read,
  input  logic               cpu_write,
  input  logic [31:0]        cpu_writedata,
  output logic [31:0]        cpu_readdata,
  output logic               cpu_irq,
  // link-layer chip host interface
  output logic               l_cs_n,
  output logic               l_wr,
  output logic [LA_W-1:0]    l_addr,
  output logic [31:0]        l_dout,
  output logic               l_doe,
  input  logic               l_ca_n,
  input  logic [31:0]        l_din,
  // external SRAM (panoramic input buffer)
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_we,
  output logic [7:0]         sram_wdata,
  input  logic [7:0]         sram_rdata
);
  localparam int OAW = $clog2(OUT_DEPTH);
  localparam int IAW = $clog2(IN_DEPTH);

  cfg_t  cfg;
  stat_t stat;

  // ---------------- link bus ----------------
  logic [3:0]  lreq, lready, ldone;
  lreq_t       lreq_d [4];
  logic [31:0] lrdata;
  logic        lerr;

  link_if #(.NREQ(4)) u_link (
    .clk, .rst_n, .req(lreq), .req_d(lreq_d), .ready(lready), .done(ldone),
    .rdata(lrdata), .err(lerr),
    .l_cs_n, .l_wr, .l_addr, .l_dout, .l_doe, .l_ca_n, .l_din
  );

  // ---------------- receive ----------------
  logic  rx_valid, in_full, in_empty, in_pop;
  pix_t  rx_pix, in_pix;
  logic [IAW:0] in_level;

  iso_rx u_rx (
    .clk, .rst_n, .enable(cfg.rx_en), .channel(cfg.rx_chan),
    .img_w(cfg.img_w), .img_h(cfg.img_h),
    .lreq(lreq[0]), .lreq_d(lreq_d[0]), .lready(lready[0]), .ldone(ldone[0]), .lrdata,
    .out_valid(rx_valid), .out_pix(rx_pix), .out_ready(!in_full),
    .synced(stat.rx_synced), .frames(stat.rx_frames), .skipped(stat.rx_skipped)
  );

  sync_fifo #(.WIDTH($bits(pix_t)), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n, .push(rx_valid && !in_full), .wdata(rx_pix), .pop(in_pop),
    .rdata(in_pix), .empty(in_empty), .full(in_full), .level(in_level)
  );

  // ---------------- output FIFO ----------------
  logic   out_push, out_full, out_empty, out_pop;
  pix_t   out_wpix, out_rpix;
  logic [OAW:0] out_level;
  logic   out_room;

  // room for the pixels that may still be in the window and filter pipeline
  assign out_room = out_level < (OAW+1)'(OUT_DEPTH - 8);
  assign in_pop   = !in_empty && (cfg.mode || out_room);

  // ---------------- focus pipeline ----------------
  logic  w_valid, l_valid, f_valid;
  win_t  win;
  wpos_t w_pos, l_pos, f_pos;
  logic [9:0] mag;
  logic [7:0] f_pix;

  window3x3 #(.MAX_W(MAX_W)) u_win (
    .clk, .rst_n, .in_valid(in_pop), .in_pix(in_pix),
    .out_valid(w_valid), .win, .pos(w_pos)
  );

  laplace3x3 u_lap (
    .clk, .rst_n, .in_valid(w_valid), .win, .in_pos(w_pos),
    .out_valid(l_valid), .mag, .out_pos(l_pos)
  );

  focus_sum u_focus (
    .clk, .rst_n, .in_valid(l_valid), .mag, .pos(l_pos),
    .roi_x(cfg.roi_x), .roi_y(cfg.roi_y), .roi_w(cfg.roi_w), .roi_h(cfg.roi_h),
    .sum(stat.focus), .sum_valid(stat.focus_valid)
  );

  // ---------------- programmable filter ----------------
  prog_filter3x3 u_filt (
    .clk, .rst_n, .in_valid(w_valid), .win, .in_pos(w_pos),
    .coef(cfg.coef), .shift(cfg.fshift),
    .out_valid(f_valid), .pix(f_pix), .out_pos(f_pos)
  );

  // ---------------- panoramic conversion ----------------
  logic  p_valid, pano_init;
  pix_t  p_pix;

  pano_conv #(.PANO_W(PANO_W), .PANO_H(PANO_H), .SRAM_AW(SRAM_AW)) u_pano (
    .clk, .rst_n, .init(pano_init),
    .img_w(cfg.img_w), .img_h(cfg.img_h), .cx(cfg.pano_cx), .cy(cfg.pano_cy), .rmin(cfg.pano_rmin),
    .in_valid(in_pop && cfg.mode), .in_pix(in_pix),
    .out_valid(p_valid), .out_pix(p_pix), .out_ready(!out_full),
    .sram_addr, .sram_we, .sram_wdata, .sram_rdata,
    .busy(stat.pano_busy), .frames(stat.pano_frames), .dropped(stat.pano_dropped)
  );

  always_comb begin
    if (cfg.mode) begin
      out_push = p_valid && !out_full;
      out_wpix = p_pix;
    end else begin
      out_push     = f_valid && f_pos.interior && !out_full;
      out_wpix.y   = f_pix;
      out_wpix.col = f_pos.col;
      out_wpix.row = f_pos.row;
      out_wpix.sof = (f_pos.col == XW'(1)) && (f_pos.row == YW'(1));
      out_wpix.eof = f_pos.eof;
    end
  end

  sync_fifo #(.WIDTH($bits(pix_t)), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .push(out_push), .wdata(out_wpix), .pop(out_pop),
    .rdata(out_rpix), .empty(out_empty), .full(out_full), .level(out_level)
  );

  // ---------------- transmit ----------------
  iso_tx #(.PKT_Q(PKT_Q)) u_tx (
    .clk, .rst_n, .enable(cfg.tx_en), .channel(cfg.tx_chan),
    .in_empty(out_empty), .in_pix(out_rpix), .in_pop(out_pop),
    .lreq(lreq[1]), .lreq_d(lreq_d[1]), .lready(lready[1]), .ldone(ldone[1]),
    .packets(stat.tx_packets)
  );

  logic        acmd_valid;
  logic [15:0] acmd_dest;
  logic [47:0] acmd_offset;
  logic [31:0] acmd_data;

  async_tx u_async (
    .clk, .rst_n, .cmd_valid(acmd_valid), .dest_id(acmd_dest), .offset(acmd_offset),
    .data(acmd_data), .busy(stat.async_busy),
    .lreq(lreq[2]), .lreq_d(lreq_d[2]), .lready(lready[2]), .ldone(ldone[2]),
    .requests(stat.async_reqs)
  );

  // ---------------- processor registers ----------------
  cpu_regs u_regs (
    .clk, .rst_n, .address(cpu_address), .read(cpu_read), .write(cpu_write),
    .writedata(cpu_writedata), .readdata(cpu_readdata), .irq(cpu_irq),
    .cfg, .stat, .pano_init,
    .acmd_valid, .acmd_dest, .acmd_offset, .acmd_data,
    .lreq(lreq[3]), .lreq_d(lreq_d[3]), .lready(lready[3]), .ldone(ldone[3]),
    .lerr, .lrdata
  );
endmodule
