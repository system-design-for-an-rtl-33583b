// tb_async_tx: three camera commands (a focus register write among them)
// are sent through the bus master into the link-chip model; the four
// recorded quadlets of each request are compared with the write-quadlet
// layout built in the testbench, including the incrementing transaction
// label; a command given while busy must be ignored.
module tb_async_tx;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [0:0] lreq, lready, ldone;
  lreq_t lreq_d [1];
  logic [31:0] lrdata;
  logic lerr;
  logic l_cs_n, l_wr, l_doe, l_ca_n;
  logic [7:0] l_addr;
  logic [31:0] l_dout, l_din;
  logic cmd_valid, busy;
  logic [15:0] dest_id, requests;
  logic [47:0] offset;
  logic [31:0] data;

  link_if #(.NREQ(1)) u_bus (.clk, .rst_n, .req(lreq), .req_d(lreq_d), .ready(lready), .done(ldone),
    .rdata(lrdata), .err(lerr), .l_cs_n, .l_wr, .l_addr, .l_dout, .l_doe, .l_ca_n, .l_din);
  link_chip_model u_link (.clk, .rst_n, .cs_n(l_cs_n), .wr(l_wr), .addr(l_addr), .din(l_dout),
    .doe(l_doe), .ca_n(l_ca_n), .dout(l_din));
  async_tx dut (.clk, .rst_n, .cmd_valid, .dest_id, .offset, .data, .busy,
    .lreq(lreq[0]), .lreq_d(lreq_d[0]), .lready(lready[0]), .ldone(ldone[0]), .requests);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] ids  [3] = '{16'hFFC0, 16'hFFC1, 16'hFFC2};
  logic [47:0] offs [3] = '{48'hFFFF_F0F0_0828, 48'hFFFF_F0F0_0800, 48'h0000_1234_5678};
  logic [31:0] vals [3] = '{32'h8200_0123, 32'h8200_0040, 32'hDEAD_BEEF};

  initial begin
    cmd_valid = 0; dest_id = 0; offset = 0; data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      @(posedge clk) #1;
      cmd_valid = 1; dest_id = ids[i]; offset = offs[i]; data = vals[i];
      @(posedge clk) #1;
      // a second command while busy: ignored
      dest_id = 16'h1111; data = 32'h0;
      @(posedge clk) #1 cmd_valid = 0;
      checks++; if (!busy) begin failures++; $display("not busy"); end
      wait (!busy);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (u_link.atf.size() != 12 || requests != 16'd3) begin failures++; $display("atf %0d req %0d", u_link.atf.size(), requests); end
    for (int i = 0; i < 3 && u_link.atf.size() == 12; i++) begin
      logic [31:0] e [4];
      e[0] = {14'b0, 2'd2, 6'(i), 2'b01, 4'h0, 4'h0};
      e[1] = {ids[i], offs[i][47:32]};
      e[2] = offs[i][31:0];
      e[3] = vals[i];
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (u_link.atf[4*i+q] != e[q] || u_link.atf_a[4*i+q] != (q == 0 ? LREG_ATF_FIRST : q == 3 ? LREG_ATF_LAST : LREG_ATF_CONT)) begin
          failures++; $display("req %0d q%0d: %h exp %h", i, q, u_link.atf[4*i+q], e[q]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
