// link_chip_model: behavioural model of the IEEE 1394 link-layer chip's host
// interface, for simulation only (not synthesizable).
// On a rising edge with cs_n low it performs the access and answers with
// ca_n low (and read data) for one clock. Addresses:
//   GRF_CNT / GRF_DATA  fill count (at most 511) and read port of the receive FIFO, which
//                       the testbench fills with push_grf()
//   ATF_* / ITF_*       writes are recorded in atf[] / itf[] with the address
//   NOACK_ADDR          never acknowledged (to provoke a bus timeout)
//   anything else       a plain 32-bit register
module link_chip_model
  import sv_pkg::*;
#(
  parameter logic [LA_W-1:0] NOACK_ADDR = 8'hFC
) (
  input  logic            clk,
  input  logic            rst_n,   // accesses are ignored during reset
  input  logic            cs_n,
  input  logic            wr,
  input  logic [LA_W-1:0] addr,
  input  logic [31:0]     din,     // data from the bus master
  input  logic            doe,
  output logic            ca_n,
  output logic [31:0]     dout
);
  logic [31:0] grf [$];
  logic [31:0] atf [$];
  logic [7:0]  atf_a [$];
  logic [31:0] itf [$];
  logic [7:0]  itf_a [$];
  logic [31:0] regs [256];
  int          accesses = 0;
  int          protocol_errors = 0;

  initial begin
    ca_n = 1'b1;
    dout = '0;
    for (int i = 0; i < 256; i++) regs[i] = 32'h1000_0000 + i;
  end

  function automatic void push_grf(input logic [31:0] q);
    grf.push_back(q);
  endfunction

  always @(posedge clk) begin
    ca_n <= 1'b1;
    if (rst_n && !cs_n && addr != NOACK_ADDR) begin
      accesses++;
      ca_n <= 1'b0;
      if (wr) begin
        if (!doe) begin protocol_errors++; $display("link model: write without data enable"); end
        if (addr >= LREG_ATF_FIRST && addr <= LREG_ATF_LAST) begin
          atf.push_back(din); atf_a.push_back(addr);
        end else if (addr >= LREG_ITF_FIRST && addr <= LREG_ITF_LAST) begin
          itf.push_back(din); itf_a.push_back(addr);
        end else begin
          regs[addr] = din;
        end
      end else begin
        if (addr == LREG_GRF_CNT)       dout <= (grf.size() > 511) ? 32'd511 : 32'(grf.size());
        else if (addr == LREG_GRF_DATA) dout <= (grf.size() > 0) ? grf.pop_front() : 32'hDEAD_BEEF;
        else                            dout <= regs[addr];
      end
    end
  end
endmodule
