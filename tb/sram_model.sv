// sram_model: behavioural model of the board's synchronous SRAM for
// simulation: one byte per address, write on the rising edge when we is
// high, read data registered one clock after the address.
module sram_model #(
  parameter int AW = 22
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];
  int writes = 0, reads = 0;
  always @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      writes++;
    end else begin
      reads++;
    end
    rdata <= mem[addr];
  end
endmodule
