// tb_vision_top: end-to-end run of the vision subsystem at reduced sizes
// (24 x 12 camera frames, 16 x 4 panorama, 8-quadlet packets), with the
// link chip and the SRAM as behavioural models and the processor replaced
// by bus tasks. It
//  1. configures the registers as the processor software would,
//  2. streams a random camera frame (with a foreign-channel packet and a
//     packet before sync) into the link chip's receive FIFO, first with the
//     transmitter disabled so that the output FIFO, the input FIFO and the
//     receive path stall, then enabled,
//  3. checks the focus interrupt and value against a reference computed here,
//     and every byte of the filtered image sent back as isochronous packets,
//  4. sends an asynchronous focus command and checks the request quadlets,
//  5. reads a link-chip register directly and provokes a bus timeout,
//  6. switches to panorama mode, streams a ramp frame and checks the
//     panoramic packets against the ramp at the polar sample points.
// Each mechanism is counted and must have happened at least once.
module tb_vision_top;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 24, H = 12, PQ = 8, PW = 16, PH = 4, RXC = 2, TXC = 3;
  localparam int RX0 = 4, RY0 = 3, RW = 12, RH = 6, PCX = 12, PCY = 6, PRMIN = 2;
  localparam real PI = 3.14159265358979;

  logic [5:0]  cpu_address;
  logic        cpu_read, cpu_write, cpu_irq;
  logic [31:0] cpu_writedata, cpu_readdata;
  logic        l_cs_n, l_wr, l_doe, l_ca_n;
  logic [7:0]  l_addr;
  logic [31:0] l_dout, l_din;
  logic [21:0] sram_addr;
  logic        sram_we;
  logic [7:0]  sram_wdata, sram_rdata;

  vision_top #(.MAX_W(64), .IN_DEPTH(16), .OUT_DEPTH(64), .PKT_Q(PQ), .PANO_W(PW), .PANO_H(PH), .SRAM_AW(22)) dut (.*);
  link_chip_model u_link (.clk, .rst_n, .cs_n(l_cs_n), .wr(l_wr), .addr(l_addr), .din(l_dout),
    .doe(l_doe), .ca_n(l_ca_n), .dout(l_din));
  sram_model #(.AW(22)) u_sram (.clk, .addr(sram_addr), .we(sram_we), .wdata(sram_wdata), .rdata(sram_rdata));

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor bus ----------------
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

  // ---------------- camera ----------------
  logic [7:0] img [H][W];
  function automatic logic [31:0] hdr(int len, int ch, int sy);
    return {16'(len), 2'b01, 6'(ch), TCODE_ISO, 4'(sy)};
  endfunction
  task automatic camera_frame();
    // 6 quadlets (12 pixels) per packet
    for (int p = 0; p < W * H / 12; p++) begin
      if (p == 3) begin u_link.push_grf(hdr(4, RXC + 7, 0)); u_link.push_grf(32'h0); end
      u_link.push_grf(hdr(24, RXC, p == 0));
      for (int q = 0; q < 6; q++) begin
        int n;
        n = p * 12 + q * 2;
        u_link.push_grf({8'h80, img[n / W][n % W], 8'h80, img[(n + 1) / W][(n + 1) % W]});
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int m_in_full = 0, m_out_room = 0, m_rx_stall = 0, m_sram_share = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.in_full) m_in_full++;
    if (!dut.out_room && !dut.cfg.mode) m_out_room++;
    if (dut.u_rx.out_valid && dut.in_full) m_rx_stall++;
    if (dut.u_pano.cs == 3 && sram_we) m_sram_share++;   // reader waits for the writer
  end

  // ---------------- isochronous output parser ----------------
  int itf_pos = 0;
  task automatic next_packet(output int nbytes, output logic sy, output logic [7:0] bytes [$]);
    logic [31:0] h;
    bytes = {};
    wait (u_link.itf.size() > itf_pos);
    h = u_link.itf[itf_pos];
    check(h[7:4] == TCODE_ISO && h[13:8] == 6'(TXC) && u_link.itf_a[itf_pos] == LREG_ITF_FIRST, $sformatf("iso header %h", h));
    nbytes = int'(h[31:16]);
    sy = (h[3:0] == 4'd1);
    wait (u_link.itf.size() >= itf_pos + 1 + nbytes / 4);
    for (int q = 0; q < nbytes / 4; q++)
      for (int b = 0; b < 4; b++) bytes.push_back(u_link.itf[itf_pos + 1 + q][31 - 8 * b -: 8]);
    check(u_link.itf_a[itf_pos + nbytes / 4] == LREG_ITF_LAST, "last payload quadlet sends the packet");
    itf_pos += 1 + nbytes / 4;
  endtask

  initial begin
    logic [31:0] d;
    int exp_focus, nb, n, npk;
    logic sy;
    logic [7:0] bytes [$];
    int ref_f [$];
    cpu_address = 0; cpu_read = 0; cpu_write = 0; cpu_writedata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. configuration
    cpu_wr(6'h03, {18'b0, 6'(TXC), 2'b0, 6'(RXC)});
    cpu_wr(6'h04, {6'b0, 10'(H), 5'b0, 11'(W)});
    cpu_wr(6'h05, {6'b0, 10'(RY0), 5'b0, 11'(RX0)});
    cpu_wr(6'h06, {6'b0, 10'(RH), 5'b0, 11'(RW)});
    for (int k = 0; k < 9; k++) cpu_wr(6'h08 + 6'(k), (k == 4) ? 32'd5 : (k % 2) ? 32'hFF : 32'd0);
    cpu_wr(6'h07, 32'd0);
    cpu_wr(6'h18, {6'b0, 10'(PCY), 5'b0, 11'(PCX)});
    cpu_wr(6'h19, 32'(PRMIN));
    cpu_wr(6'h00, 32'b11001);          // rx on, tx off, filter mode, irq on, build angle table

    // 2. first frame: random image, a stray packet first
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'($urandom);
    u_link.push_grf(hdr(8, RXC, 0)); u_link.push_grf(32'h80FF80FF); u_link.push_grf(32'h80FF80FF);
    camera_frame();
    wait (m_rx_stall > 20 || $time > 1000000);
    cpu_wr(6'h00, 32'b01011);          // transmitter on
    wait (cpu_irq || $time > 1500000);

    // 3. focus value
    exp_focus = 0;
    for (int y = 1; y < H - 1; y++) for (int x = 1; x < W - 1; x++) begin
      int l;
      l = int'(img[y-1][x]) + int'(img[y+1][x]) + int'(img[y][x-1]) + int'(img[y][x+1]) - 4 * int'(img[y][x]);
      if (l < 0) l = -l;
      if (x >= RX0 && x < RX0 + RW && y >= RY0 && y < RY0 + RH) exp_focus += l;
      l = 5 * int'(img[y][x]) - int'(img[y-1][x]) - int'(img[y+1][x]) - int'(img[y][x-1]) - int'(img[y][x+1]);
      ref_f.push_back(l < 0 ? 0 : l > 255 ? 255 : l);
    end
    check(cpu_irq == 1'b1, "focus interrupt");
    cpu_rd(6'h02, d);
    check(d == 32'(exp_focus), $sformatf("focus %0d expected %0d", d, exp_focus));
    check(cpu_irq == 1'b0, "interrupt cleared by reading");

    // filtered image: (W-2) x (H-2) pixels in packets of PQ quadlets
    n = 0; npk = 0;
    while (n < ref_f.size()) begin
      next_packet(nb, sy, bytes);
      check(sy == (npk == 0), "sy marks the first packet of the frame");
      for (int b = 0; b < nb; b++) begin
        if (n < ref_f.size()) begin
          check(bytes[b] == 8'(ref_f[n]), $sformatf("filtered pixel %0d: %0d expected %0d", n, bytes[b], ref_f[n]));
          n++;
        end
      end
      npk++;
    end
    check(npk == ((W - 2) * (H - 2) / 4 + PQ - 1) / PQ, $sformatf("%0d filter packets", npk));

    // 4. asynchronous focus command
    cpu_wr(6'h11, 32'hFFC1); cpu_wr(6'h12, 32'hFFFF); cpu_wr(6'h13, 32'hF0F0_0828);
    cpu_wr(6'h14, 32'h8200_0321);
    repeat (40) @(posedge clk);
    check(u_link.atf.size() == 4, $sformatf("async request quadlets %0d", u_link.atf.size()));
    if (u_link.atf.size() == 4) begin
      check(u_link.atf[0][7:4] == TCODE_WRQ && u_link.atf[1] == 32'hFFC1_FFFF && u_link.atf[2] == 32'hF0F0_0828
            && u_link.atf[3] == 32'h8200_0321 && u_link.atf_a[3] == LREG_ATF_LAST, "async request content");
    end

    // 5. direct link-chip access and a timeout
    cpu_wr(6'h15, 32'h0000_0020);
    repeat (10) @(posedge clk);
    cpu_rd(6'h17, d);
    check(d == 32'h1000_0020, $sformatf("link register read %h", d));
    cpu_wr(6'h15, 32'h0000_00FC);
    repeat (40) @(posedge clk);
    cpu_rd(6'h01, d);
    check(d[5] == 1'b1, "link timeout reported");

    // 6. panorama mode with a ramp frame
    cpu_wr(6'h00, 32'b01111);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 8'(x + 2 * y + 10);
    camera_frame();
    camera_frame();   // arrives while the first one is converted
    for (int pf = 0; pf < 1; pf++) begin
    n = 0; npk = 0;
    while (n < PW * PH) begin
      next_packet(nb, sy, bytes);
      check(sy == (npk == 0), "sy on first panorama packet");
      for (int b = 0; b < nb && n < PW * PH; b++) begin
        int a, j;
        real x, y, e;
        a = n % PW; j = n / PW;
        x = PCX + (PRMIN + j) * $cos(2.0 * PI * a / PW);
        y = PCY + (PRMIN + j) * $sin(2.0 * PI * a / PW);
        // the last row and column have no right/lower neighbour: black
        e = (y >= H - 1.0 || x >= W - 1.0) ? 0.0 : x + 2.0 * y + 10.0;
        if (!(y > H - 1.01 && y < H - 0.99))
          check($itor(bytes[b]) - e <= 1.0 && e - $itor(bytes[b]) <= 1.0,
                $sformatf("panorama (%0d,%0d) = %0d expected %f", a, j, bytes[b], e));
        n++;
      end
      npk++;
    end
    end
    // the second frame is either converted or dropped, whichever its timing gives
    wait (dut.stat.rx_frames == 16'd3);
    repeat (20) @(posedge clk);
    wait (!dut.stat.pano_busy);
    cpu_rd(6'h1C, d);
    check(d[15:0] >= 16'd1 && d[15:0] + d[31:16] == 16'd2, $sformatf("panoramic frames %0d dropped %0d", d[15:0], d[31:16]));
    cpu_rd(6'h1A, d);
    check(d[15:0] == 16'd3, $sformatf("frames received %0d", d[15:0]));
    cpu_rd(6'h1B, d);
    check(d[15:0] == 16'd3 && d[31:16] == 16'd1, $sformatf("skipped %0d async %0d", d[15:0], d[31:16]));

    // every mechanism must have occurred
    check(m_in_full > 0, "input FIFO full");
    check(m_out_room > 0, "output FIFO back-pressure");
    check(m_rx_stall > 0, "receive stalled");
    check(m_sram_share > 0, "SRAM shared between writer and reader");
    $display("mechanisms: in_full=%0d out_room=%0d rx_stall=%0d sram_share=%0d", m_in_full, m_out_room, m_rx_stall, m_sram_share);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
