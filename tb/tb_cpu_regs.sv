// tb_cpu_regs: processor-bus writes and reads of the configuration
// registers (read-back and the cfg outputs), the focus-ready flag and its
// interrupt, the asynchronous command pulse, the panorama start pulse and a
// direct link-chip access through a responder that answers like link_if.
module tb_cpu_regs;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0]  address;
  logic        read, write, irq, pano_init, acmd_valid, lreq, lready, ldone, lerr;
  logic [31:0] writedata, readdata, acmd_data, lrdata;
  cfg_t        cfg;
  stat_t       stat;
  logic [15:0] acmd_dest;
  logic [47:0] acmd_offset;
  lreq_t       lreq_d;

  cpu_regs dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(posedge clk) #1;
    address = a; writedata = d; write = 1;
    @(posedge clk) #1 write = 0;
  endtask

  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(posedge clk) #1;
    address = a; read = 1;
    @(posedge clk) #1 read = 0;
    d = readdata;
  endtask

  // link responder: accept after two clocks, answer two clocks later
  int lacc = 0;
  initial begin
    lready = 0; ldone = 0; lerr = 0; lrdata = 0;
    forever begin
      @(posedge clk) #1;
      if (lreq) begin
        @(posedge clk) #1 lready = 1;
        @(posedge clk) #1 lready = 0;
        @(posedge clk) #1 ldone = 1; lrdata = {24'h5A5A5A, lreq_d.addr}; lacc++;
        @(posedge clk) #1 ldone = 0;
      end
    end
  end

  int pulses_a = 0, pulses_p = 0;
  always @(posedge clk) if (rst_n) begin
    if (acmd_valid) pulses_a++;
    if (pano_init) pulses_p++;
  end

  initial begin
    logic [31:0] d;
    address = 0; read = 0; write = 0; writedata = 0; stat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(6'h04, d); check(d == {6'b0, 10'd480, 5'b0, 11'd640}, $sformatf("reset IMG %h", d));
    check(cfg.coef[4] == 8'd1 && cfg.coef[0] == 8'd0, "identity filter at reset");
    wr(6'h00, 32'h0000_000F);
    check(cfg.rx_en && cfg.tx_en && cfg.mode && cfg.irq_en, "CTRL bits");
    wr(6'h04, {6'b0, 10'd240, 5'b0, 11'd320});
    check(cfg.img_w == 320 && cfg.img_h == 240, "IMG");
    wr(6'h06, {6'b0, 10'd64, 5'b0, 11'd96});
    check(cfg.roi_w == 96 && cfg.roi_h == 64, "ROI_WH");
    for (int k = 0; k < 9; k++) wr(6'h08 + 6'(k), 32'(8'(k * 17 - 60)));
    for (int k = 0; k < 9; k++) begin
      check(cfg.coef[k] == 8'(k * 17 - 60), $sformatf("coef %0d", k));
      rd(6'h08 + 6'(k), d); check(d[7:0] == 8'(k * 17 - 60), "coef read-back");
    end
    wr(6'h07, 32'd3); check(cfg.fshift == 4'd3, "shift");
    wr(6'h18, {6'b0, 10'd480, 5'b0, 11'd640}); check(cfg.pano_cx == 640 && cfg.pano_cy == 480, "pano centre");
    // focus value arrives: ready flag and interrupt, cleared by reading FOCUS
    @(posedge clk) #1 stat.focus = 32'd465479; stat.focus_valid = 1;
    @(posedge clk) #1 stat.focus_valid = 0;
    check(irq == 1'b1, "irq raised");
    rd(6'h01, d); check(d[0] == 1'b1, "focus ready");
    rd(6'h02, d); check(d == 32'd465479, $sformatf("focus %0d", d));
    check(irq == 1'b0, "irq cleared");
    // asynchronous command
    wr(6'h11, 32'hFFC0); wr(6'h12, 32'hFFFF); wr(6'h13, 32'hF0F0_0828);
    wr(6'h14, 32'h8200_0155);
    @(posedge clk) #1;
    check(pulses_a == 1 && acmd_dest == 16'hFFC0 && acmd_offset == 48'hFFFF_F0F0_0828 && acmd_data == 32'h8200_0155, $sformatf("async command p=%0d d=%h o=%h x=%h", pulses_a, acmd_dest, acmd_offset, acmd_data));
    wr(6'h00, 32'h0000_0010);
    @(posedge clk) #1;
    check(pulses_p == 1 && !cfg.mode, $sformatf("panorama start pulse %0d mode %b", pulses_p, cfg.mode));
    // direct link access
    wr(6'h16, 32'h1234_5678);
    wr(6'h15, 32'h0000_0077);
    check(lreq == 1'b1 && lreq_d.addr == 8'h77 && !lreq_d.wr, "link request");
    repeat (8) @(posedge clk);
    rd(6'h17, d); check(d == 32'h5A5A_5A77 && lacc == 1, $sformatf("link read %h", d));
    stat.rx_frames = 16'd7; stat.tx_packets = 16'd9;
    rd(6'h1A, d); check(d == {16'd9, 16'd7}, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
