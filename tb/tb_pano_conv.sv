// tb_pano_conv: a 40 x 30 test frame whose luma is the linear ramp
// x + 2y + offset is written into the SRAM model through the converter's
// writer; the 16 x 4 panorama (radii 12..15 around (20, 14)) is then
// compared with the ramp evaluated at cx + r*cos, cy + r*sin in floating
// point (bilinear interpolation of a linear ramp is exact, so +-1 allows
// only rounding). Positions outside the frame must give 0. A second frame
// arriving while the output is held back must be dropped, and a third one
// converted with its own offset. Random back-pressure on the output.
module tb_pano_conv;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 40, H = 30, PW = 16, PH = 4, CX = 20, CY = 14, RMIN = 12;
  localparam real PI = 3.14159265358979;

  logic init, in_valid, out_valid, out_ready, busy, sram_we;
  pix_t in_pix, out_pix;
  logic [21:0] sram_addr;
  logic [7:0] sram_wdata, sram_rdata;
  logic [15:0] frames, dropped;

  pano_conv #(.PANO_W(PW), .PANO_H(PH), .SRAM_AW(22)) dut (.clk, .rst_n, .init,
    .img_w(XW'(W)), .img_h(YW'(H)), .cx(XW'(CX)), .cy(YW'(CY)), .rmin(10'(RMIN)),
    .in_valid, .in_pix, .out_valid, .out_pix, .out_ready,
    .sram_addr, .sram_we, .sram_wdata, .sram_rdata, .busy, .frames, .dropped);
  sram_model #(.AW(22)) u_sram (.clk, .addr(sram_addr), .we(sram_we), .wdata(sram_wdata), .rdata(sram_rdata));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(int off);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(posedge clk) #1;
      while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(posedge clk) #1; end
      in_valid = 1;
      in_pix = '{y: 8'(x + 2 * y + off), col: XW'(x), row: YW'(y), sof: (x == 0 && y == 0), eof: (x == W-1 && y == H-1)};
    end
    @(posedge clk) #1 in_valid = 0;
  endtask

  int offset_now = 0, got = 0, outside = 0, hold = 0, stalls = 0;
  always @(negedge clk) out_ready <= !hold && ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && out_valid && !out_ready) stalls++;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int a, j;
    real x, y, e;
    logic amb, outs;
    a = got % PW; j = (got / PW) % PH;
    x = CX + (RMIN + j) * $cos(2.0 * PI * a / PW);
    y = CY + (RMIN + j) * $sin(2.0 * PI * a / PW);
    outs = (x < 0.0) || (y < 0.0) || (x >= W - 1) || (y >= H - 1);
    amb  = (x > -0.01 && x < 0.01) || (y > -0.01 && y < 0.01)
        || (x > W - 1.01 && x < W - 0.99) || (y > H - 1.01 && y < H - 0.99);
    e = outs ? 0.0 : x + 2.0 * y + offset_now;
    checks++;
    if (out_pix.col != XW'(a) || out_pix.row != YW'(j) || out_pix.sof != (a == 0 && j == 0)
        || out_pix.eof != (a == PW - 1 && j == PH - 1)) begin
      failures++; $display("position wrong at %0d", got);
    end
    if (outs) outside++;
    if (!amb) begin
      checks++;
      if ($itor(out_pix.y) - e > 1.0 || e - $itor(out_pix.y) > 1.0) begin
        failures++; $display("a=%0d j=%0d: %0d expected %f (x=%f y=%f)", a, j, out_pix.y, e, x, y);
      end
    end
    got++;
  end

  initial begin
    init = 0; in_valid = 0; in_pix = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) #1 init = 1;
    @(posedge clk) #1 init = 0;
    wait (!busy);
    offset_now = 3;
    send_frame(3);
    // hold the output while the next frame arrives: that frame is dropped
    repeat (20) @(posedge clk);
    hold = 1;
    send_frame(100);
    hold = 0;
    wait (!busy);
    checks++; if (dropped != 16'd1) begin failures++; $display("dropped %0d", dropped); end
    offset_now = 50;
    send_frame(50);
    repeat (5) @(posedge clk);
    wait (!busy);
    repeat (5) @(posedge clk);
    checks++;
    if (frames != 16'd2 || got != 2 * PW * PH || outside == 0 || stalls == 0) begin
      failures++; $display("frames %0d got %0d outside %0d stalls %0d", frames, got, outside, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
