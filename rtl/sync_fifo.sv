// sync_fifo: single-clock first-in first-out buffer.
// The internal buffers between the receive, processing and transmit units
// are all of this kind: a producer pushes while `full` is low, a consumer
// pops while `empty` is low, and `level` tells how many entries are held so
// a producer can stop early (almost-full). Storage is a plain array that
// maps onto on-chip RAM; read data is shown combinationally from the head
// (first-word fall-through). A push to a full FIFO or a pop from an empty
// one is ignored and counted by the assertions. Depth must be a power of two.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wp, rp;
  logic do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign level   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (level == (AW+1)'(DEPTH));
  assign rdata   = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

`ifndef SYNTHESIS
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("sync_fifo: pop while empty");
`endif
endmodule
