// tb_iso_tx: a 10 x 3 frame (30 pixels) and then a second one are offered
// through a FIFO-like source with random gaps; with PKT_Q = 3 quadlets the
// frame needs packets of 12, 12 and 6 bytes (the last quadlet padded).
// The link-chip model records the isochronous transmit FIFO writes; the
// testbench checks header fields (length, tag, channel, tcode, sy), payload
// bytes, the FIRST/CONT/LAST addresses and the packet counter.
module tb_iso_tx;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 10, H = 3, PQ = 3, CH = 9;

  logic [0:0] lreq, lready, ldone;
  lreq_t lreq_d [1];
  logic [31:0] lrdata;
  logic lerr;
  logic l_cs_n, l_wr, l_doe, l_ca_n;
  logic [7:0] l_addr;
  logic [31:0] l_dout, l_din;
  logic in_empty, in_pop;
  pix_t in_pix;
  logic [15:0] packets;

  link_if #(.NREQ(1)) u_bus (.clk, .rst_n, .req(lreq), .req_d(lreq_d), .ready(lready), .done(ldone),
    .rdata(lrdata), .err(lerr), .l_cs_n, .l_wr, .l_addr, .l_dout, .l_doe, .l_ca_n, .l_din);
  link_chip_model u_link (.clk, .rst_n, .cs_n(l_cs_n), .wr(l_wr), .addr(l_addr), .din(l_dout),
    .doe(l_doe), .ca_n(l_ca_n), .dout(l_din));
  iso_tx #(.PKT_Q(PQ)) dut (.clk, .rst_n, .enable(1'b1), .channel(6'(CH)), .in_empty, .in_pix, .in_pop,
    .lreq(lreq[0]), .lreq_d(lreq_d[0]), .lready(lready[0]), .ldone(ldone[0]), .packets);

  function automatic logic [7:0] luma(int f, int n);
    return 8'(n * 5 + f * 100 + 1);
  endfunction

  // pixel source: n counts pixels of two frames; random availability
  int n = 0;
  logic avail;
  always @(negedge clk) avail <= ($urandom_range(0, 2) != 0);
  assign in_empty = !(avail && n < 2 * W * H);
  always_comb begin
    in_pix     = '0;
    in_pix.y   = luma(n / (W * H), n % (W * H));
    in_pix.sof = (n % (W * H)) == 0;
    in_pix.eof = (n % (W * H)) == W * H - 1;
  end
  always @(posedge clk) if (rst_n && in_pop) n <= n + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(inout int k, input logic [31:0] v, input logic [7:0] a, input string what);
    checks++;
    if (k >= u_link.itf.size()) begin failures++; $display("missing %s", what); end
    else if (u_link.itf[k] != v || u_link.itf_a[k] != a) begin
      failures++; $display("%s: %h @%h, expected %h @%h", what, u_link.itf[k], u_link.itf_a[k], v, a);
    end
    k++;
  endtask

  initial begin
    int k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (packets == 16'(2 * 3) || $time > 150000);
    repeat (10) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < 3; p++) begin
        int nq, base;
        nq = (p < 2) ? 3 : 2;
        base = p * 12;
        expect_q(k, {16'(nq * 4), 2'b01, 6'(CH), 4'hA, (p == 0) ? 4'd1 : 4'd0}, LREG_ITF_FIRST, "header");
        for (int q = 0; q < nq; q++) begin
          logic [31:0] v;
          for (int b = 0; b < 4; b++) begin
            int idx;
            idx = base + q * 4 + b;
            v[31 - 8 * b -: 8] = (idx < W * H) ? luma(f, idx) : 8'h00;
          end
          expect_q(k, v, (q == nq - 1) ? LREG_ITF_LAST : LREG_ITF_CONT, "payload");
        end
      end
    end
    checks++;
    if (u_link.itf.size() != k || packets != 16'd6) begin failures++; $display("itf %0d packets %0d", u_link.itf.size(), packets); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
