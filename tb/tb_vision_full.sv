// tb_vision_full: one complete focus-and-filter frame at full size, with
// every parameter of vision_top at its default. A 640 x 480 YUV 4:2:2 frame
// (one 1280-byte isochronous packet per line, as from the stereo cameras)
// is put into the link-chip model; with the reset configuration (identity
// filter, 128 x 128 focus region in the centre) the testbench checks the
// focus value against its own Laplace sum, every byte of the 638 x 478
// image sent back in 160-quadlet packets, and that the frame was handled
// within 1,000,000 clocks: one frame time at 30 frames/s with a 30 MHz clock.
// It then switches to panorama mode and sends one 1280 x 960 frame of a
// smooth test pattern (as from the omnidirectional camera); the 1024 x 240
// panorama (radii 200..439 around (640, 480)) is compared with a bilinear
// sample of the pattern at the polar positions computed here in floating
// point, and the conversion must end within 4,000,000 clocks, one frame time
// at 7.5 frames/s.
module tb_vision_full;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 640, H = 480;

  logic [5:0]  cpu_address;
  logic        cpu_read, cpu_write, cpu_irq;
  logic [31:0] cpu_writedata, cpu_readdata;
  logic        l_cs_n, l_wr, l_doe, l_ca_n;
  logic [7:0]  l_addr;
  logic [31:0] l_dout, l_din;
  logic [21:0] sram_addr;
  logic        sram_we;
  logic [7:0]  sram_wdata, sram_rdata;

  vision_top dut (.*);
  link_chip_model u_link (.clk, .rst_n, .cs_n(l_cs_n), .wr(l_wr), .addr(l_addr), .din(l_dout),
    .doe(l_doe), .ca_n(l_ca_n), .dout(l_din));
  sram_model #(.AW(22)) u_sram (.clk, .addr(sram_addr), .we(sram_we), .wdata(sram_wdata), .rdata(sram_rdata));

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog: frames=%0d synced=%b grf=%0d pkts=%0d row=%0d col=%0d st=%0d", dut.stat.rx_frames, dut.stat.rx_synced, u_link.grf.size(), dut.stat.tx_packets, dut.u_rx.row, dut.u_rx.col, dut.u_rx.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_wr(input logic [5:0] a, input logic [31:0] d);
    @(posedge clk) #1;
    cpu_address = a; cpu_writedata = d; cpu_write = 1;
    @(posedge clk) #1 cpu_write = 0;
  endtask
  task automatic cpu_rd(input logic [5:0] a, output logic [31:0] d);
    @(posedge clk) #1;
    cpu_address = a; cpu_read = 1;
    @(posedge clk) #1 cpu_read = 0;
    d = cpu_readdata;
  endtask

  logic [7:0] img [H][W];
  logic [7:0] omni [960][1280];
  localparam real PI = 3.14159265358979;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    logic [31:0] d;
    longint exp_focus;
    int t0, t_irq, pos, n, npk;
    cpu_address = 0; cpu_read = 0; cpu_write = 0; cpu_writedata = 0;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    cpu_wr(6'h00, 32'b01011);   // receive, transmit, filter mode, interrupt
    t0 = cyc;
    for (int y = 0; y < H; y++) begin
      u_link.push_grf({16'd1280, 2'b01, 6'd0, TCODE_ISO, (y == 0) ? 4'd1 : 4'd0});
      for (int x = 0; x < W; x += 2) u_link.push_grf({8'h80, img[y][x], 8'h80, img[y][x + 1]});
    end
    wait (cpu_irq);
    t_irq = cyc - t0;
    exp_focus = 0;
    for (int y = 176; y < 304; y++) for (int x = 256; x < 384; x++) begin
      int l;
      l = int'(img[y-1][x]) + int'(img[y+1][x]) + int'(img[y][x-1]) + int'(img[y][x+1]) - 4 * int'(img[y][x]);
      exp_focus += (l < 0) ? -l : l;
    end
    cpu_rd(6'h02, d);
    check(d == 32'(exp_focus), $sformatf("focus %0d expected %0d", d, exp_focus));
    check(t_irq < 1000000, $sformatf("frame took %0d clocks", t_irq));
    $display("frame to focus interrupt: %0d clocks", t_irq);
    // output stream: identity filter, so the interior pixels come back
    wait (dut.stat.tx_packets == 16'd477);
    repeat (20) @(posedge clk);
    pos = 0; n = 0; npk = 0;
    while (pos < u_link.itf.size()) begin
      logic [31:0] h;
      h = u_link.itf[pos];
      check(h[31:16] == ((npk < 476) ? 16'd640 : 16'(((638 * 478) % 640 + 3) / 4 * 4)) && h[3:0] == ((npk == 0) ? 4'd1 : 4'd0),
            $sformatf("header %0d: %h", npk, h));
      for (int q = 0; q < int'(h[31:18]); q++)
        for (int b = 0; b < 4; b++) begin
          if (n < 638 * 478) begin
            check(u_link.itf[pos + 1 + q][31 - 8 * b -: 8] == img[n / 638 + 1][n % 638 + 1], $sformatf("pixel %0d", n));
            n++;
          end
        end
      pos += 1 + int'(h[31:18]);
      npk++;
    end
    check(n == 638 * 478 && npk == 477, $sformatf("%0d pixels in %0d packets", n, npk));

    // ---- panorama at full size ----
    for (int y = 0; y < 960; y++) for (int x = 0; x < 1280; x++)
      omni[y][x] = 8'($rtoi(128.0 + 100.0 * $sin(x / 40.0) * $cos(y / 30.0) + 0.5));
    cpu_wr(6'h04, {6'b0, 10'd960, 5'b0, 11'd1280});
    cpu_wr(6'h18, {6'b0, 10'd480, 5'b0, 11'd640});
    cpu_wr(6'h19, 32'd200);
    cpu_wr(6'h00, 32'b10111);   // receive, transmit, panorama mode, build angle table
    repeat (5) @(posedge clk);
    wait (!dut.stat.pano_busy);
    for (int y = 0; y < 960; y++) begin
      u_link.push_grf({16'd2560, 2'b01, 6'd0, TCODE_ISO, (y == 0) ? 4'd1 : 4'd0});
      for (int x = 0; x < 1280; x += 2) u_link.push_grf({8'h80, omni[y][x], 8'h80, omni[y][x + 1]});
    end
    wait (dut.stat.pano_busy);
    t0 = cyc;
    wait (dut.stat.pano_frames == 16'd1);
    t_irq = cyc - t0;
    check(t_irq < 4000000, $sformatf("panorama took %0d clocks", t_irq));
    $display("panorama conversion: %0d clocks", t_irq);
    wait (dut.stat.tx_packets == 16'(477 + 384));
    repeat (20) @(posedge clk);
    n = 0; npk = 0;
    while (pos < u_link.itf.size()) begin
      logic [31:0] h;
      h = u_link.itf[pos];
      check(h[31:16] == 16'd640 && h[3:0] == ((npk == 0) ? 4'd1 : 4'd0), $sformatf("panorama header %0d: %h", npk, h));
      for (int q = 0; q < int'(h[31:18]); q++)
        for (int b = 0; b < 4; b++) begin
          int a, j, x0, y0;
          real xr, yr, fx, fy, e, got;
          a = n % 1024; j = n / 1024;
          xr = 640.0 + (200 + j) * $cos(2.0 * PI * a / 1024);
          yr = 480.0 + (200 + j) * $sin(2.0 * PI * a / 1024);
          x0 = $rtoi($floor(xr)); y0 = $rtoi($floor(yr));
          fx = xr - x0; fy = yr - y0;
          e = (1 - fy) * ((1 - fx) * omni[y0][x0] + fx * omni[y0][x0 + 1]) + fy * ((1 - fx) * omni[y0 + 1][x0] + fx * omni[y0 + 1][x0 + 1]);
          got = $itor(u_link.itf[pos + 1 + q][31 - 8 * b -: 8]);
          check(got - e <= 1.5 && e - got <= 1.5, $sformatf("panorama (%0d,%0d) = %0f expected %f", a, j, got, e));
          n++;
        end
      pos += 1 + int'(h[31:18]);
      npk++;
    end
    check(n == 1024 * 240 && npk == 384, $sformatf("%0d panorama pixels in %0d packets", n, npk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
