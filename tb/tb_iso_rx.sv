// tb_iso_rx: isochronous packets of an 8 x 4 luma test frame, preceded by a
// packet from the middle of a frame (before sync) and interleaved with a
// packet of another channel, are put in the link-chip model's receive FIFO.
// Checks that only in-sync pixels of the right channel come out, in order,
// with the right luma, coordinates and first/last flags, under random
// back-pressure, and that the frame and skip counters agree.
module tb_iso_rx;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 8, H = 4, CH = 5;

  logic [0:0] lreq, lready, ldone;
  lreq_t lreq_d [1];
  logic [31:0] lrdata;
  logic lerr;
  logic l_cs_n, l_wr, l_doe, l_ca_n;
  logic [7:0] l_addr;
  logic [31:0] l_dout, l_din;
  logic out_valid, out_ready, synced;
  pix_t out_pix;
  logic [15:0] frames, skipped;

  link_if #(.NREQ(1)) u_bus (.clk, .rst_n, .req(lreq), .req_d(lreq_d), .ready(lready), .done(ldone),
    .rdata(lrdata), .err(lerr), .l_cs_n, .l_wr, .l_addr, .l_dout, .l_doe, .l_ca_n, .l_din);
  link_chip_model u_link (.clk, .rst_n, .cs_n(l_cs_n), .wr(l_wr), .addr(l_addr), .din(l_dout),
    .doe(l_doe), .ca_n(l_ca_n), .dout(l_din));
  iso_rx #(.POLL_GAP(4)) dut (.clk, .rst_n, .enable(1'b1), .channel(6'(CH)), .img_w(XW'(W)), .img_h(YW'(H)),
    .lreq(lreq[0]), .lreq_d(lreq_d[0]), .lready(lready[0]), .ldone(ldone[0]), .lrdata,
    .out_valid, .out_pix, .out_ready, .synced, .frames, .skipped);

  function automatic logic [7:0] luma(int f, int x, int y);
    return 8'(f * 64 + y * W + x + 3);
  endfunction

  function automatic logic [31:0] hdr(int len, int ch, int sy);
    return {16'(len), 2'b01, 6'(ch), TCODE_ISO, 4'(sy)};
  endfunction

  // one frame in packets of 4 quadlets (8 pixels), U/V bytes set to 0x80
  task automatic send_frame(int f);
    for (int p = 0; p < W * H / 8; p++) begin
      if (p == 1) begin  // a foreign packet in between
        u_link.push_grf(hdr(8, CH + 1, 0));
        u_link.push_grf(32'h1111_1111);
        u_link.push_grf(32'h2222_2222);
      end
      u_link.push_grf(hdr(16, CH, p == 0 ? 1 : 0));
      for (int q = 0; q < 4; q++) begin
        int n = p * 8 + q * 2;
        u_link.push_grf({8'h80, luma(f, n % W, n / W), 8'h80, luma(f, (n + 1) % W, (n + 1) / W)});
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got = 0, stalls = 0;
  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && out_valid && !out_ready) stalls++;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int f, n, x, y;
      f = got / (W * H); n = got % (W * H); x = n % W; y = n / W;
      checks++;
      if (out_pix.y != luma(f, x, y) || out_pix.col != XW'(x) || out_pix.row != YW'(y)
          || out_pix.sof != (n == 0) || out_pix.eof != (n == W * H - 1)) begin
        failures++;
        $display("pixel %0d: y=%0d col=%0d row=%0d sof=%b eof=%b, expected y=%0d (%0d,%0d)",
                 got, out_pix.y, out_pix.col, out_pix.row, out_pix.sof, out_pix.eof, luma(f, x, y), x, y);
      end
      got++;
    end
  end

  initial begin
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // payload of an unsynchronised packet: must be dropped
    u_link.push_grf(hdr(8, CH, 0));
    u_link.push_grf(32'h80FF_80FF);
    u_link.push_grf(32'h80FF_80FF);
    repeat (200) @(posedge clk);
    send_frame(0);
    repeat (100) @(posedge clk);
    send_frame(1);
    wait (got == 2 * W * H || $time > 150000);
    repeat (50) @(posedge clk);
    checks++; if (got != 2 * W * H) begin failures++; $display("got %0d pixels", got); end
    checks++; if (frames != 16'd2) begin failures++; $display("frames %0d", frames); end
    checks++; if (skipped != 16'd2) begin failures++; $display("skipped %0d", skipped); end
    checks++; if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    checks++; if (u_link.grf.size() != 0) begin failures++; $display("receive FIFO not drained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
