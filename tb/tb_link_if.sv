// tb_link_if: two clients issue register writes and reads through the bus
// master to the link-chip model at the same time. Checks read data, that
// every write reached the model, fixed priority when both ask together,
// the two-clock cost of back-to-back accesses, the falling-edge launch of
// the strobe and the timeout on an address that is never acknowledged.
module tb_link_if;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] req, ready, done;
  lreq_t      req_d [2];
  logic [31:0] rdata;
  logic err;
  logic l_cs_n, l_wr, l_doe, l_ca_n;
  logic [7:0] l_addr;
  logic [31:0] l_dout, l_din;

  link_if #(.NREQ(2), .TIMEOUT(6)) dut (.clk, .rst_n, .req, .req_d, .ready, .done, .rdata, .err,
    .l_cs_n, .l_wr, .l_addr, .l_dout, .l_doe, .l_ca_n, .l_din);
  link_chip_model u_link (.clk, .rst_n, .cs_n(l_cs_n), .wr(l_wr), .addr(l_addr), .din(l_dout),
    .doe(l_doe), .ca_n(l_ca_n), .dout(l_din));

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe must change only on falling edges
  always @(l_cs_n) if (rst_n) check(clk == 1'b0, "cs_n changed away from the falling edge");

  // sample point: just before the rising edge
  task automatic pre();
    @(negedge clk);
    #4;
  endtask

  // one access by client c; returns read data and error flag
  task automatic access(input int c, input logic w, input logic [7:0] a, input logic [31:0] d,
                        output logic [31:0] rd, output logic e);
    req_d[c] = '{wr: w, addr: a, wdata: d};
    @(posedge clk) #1 req[c] = 1'b1;
    do pre(); while (!ready[c]);
    @(posedge clk) #1 req[c] = 1'b0;
    do pre(); while (!done[c]);
    rd = rdata; e = err;
  endtask

  logic [31:0] rd0, rd1;
  logic e0, e1;
  int t0, t1;
  initial begin
    req = '0; req_d[0] = '0; req_d[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // single write then read back
    access(0, 1'b1, 8'h10, 32'hCAFE_0001, rd0, e0);
    access(0, 1'b0, 8'h10, 32'h0, rd0, e0);
    check(rd0 == 32'hCAFE_0001 && !e0, $sformatf("read back %h", rd0));
    access(1, 1'b0, 8'h22, 32'h0, rd1, e1);
    check(rd1 == 32'h1000_0022, $sformatf("reset value %h", rd1));
    // both clients together: client 0 must win first
    @(posedge clk) #1;
    req_d[0] = '{wr: 1'b1, addr: 8'h30, wdata: 32'h1111_1111};
    req_d[1] = '{wr: 1'b1, addr: 8'h31, wdata: 32'h2222_2222};
    req = 2'b11;
    pre();
    check(ready == 2'b01, "priority to client 0");
    @(posedge clk) #1 req[0] = 1'b0;
    do pre(); while (!ready[1]);
    @(posedge clk) #1 req[1] = 1'b0;
    repeat (6) @(posedge clk);
    check(u_link.regs[8'h30] == 32'h1111_1111 && u_link.regs[8'h31] == 32'h2222_2222, "both writes arrived");
    // back-to-back: client 0 streams 20 writes into the ATF; 2 clocks each
    t0 = $time;
    for (int i = 0; i < 20; i++) begin
      access(0, 1'b1, LREG_ATF_CONT, 32'(i * 7), rd0, e0);
    end
    t1 = $time;
    check(u_link.atf.size() == 20, $sformatf("20 quadlets in ATF, got %0d first %h", u_link.atf.size(), u_link.atf[0]));
    for (int i = 0; i < 20 && i < u_link.atf.size(); i++) check(u_link.atf[i] == 32'(i * 7), "ATF data");
    // with this single-client task each access costs strobe + ack + done + task
    // overhead; the master itself must need only 2 clocks when requests wait
    @(posedge clk) #1;
    req_d[0] = '{wr: 1'b1, addr: LREG_ITF_CONT, wdata: 32'h5};
    req_d[1] = '{wr: 1'b1, addr: LREG_ITF_CONT, wdata: 32'h6};
    req = 2'b11;
    t0 = 0;
    begin
      int cyc, grants;
      cyc = 0; grants = 0;
      while (grants < 2) begin
        pre();
        cyc++;
        if (ready[0]) begin grants++; @(posedge clk) #1 req[0] = 1'b0; end
        else if (ready[1]) begin grants++; @(posedge clk) #1 req[1] = 1'b0; end
      end
      check(cyc == 3, $sformatf("second grant taken %0d clocks after the first request (expect 3)", cyc));
    end
    repeat (6) @(posedge clk);
    // timeout
    access(1, 1'b0, 8'hFC, 32'h0, rd1, e1);
    check(e1 == 1'b1, "timeout reported");
    access(1, 1'b0, 8'h10, 32'h0, rd1, e1);
    check(e1 == 1'b0 && rd1 == 32'hCAFE_0001, "bus usable after timeout");
    check(u_link.protocol_errors == 0, "bus protocol kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
