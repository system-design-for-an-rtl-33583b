// link_if: bus master for the memory-mapped host interface of the IEEE 1394
// link-layer chip.
// Several units (isochronous receive, isochronous transmit, asynchronous
// transmit, processor) need the link chip's registers and FIFOs; this block
// arbitrates between them with fixed priority (client 0 highest) and runs
// one bus cycle at a time. Both boards share one clock: the pins towards the
// link chip are launched and sampled on the falling edge, so the link chip,
// working on the rising edge, sees a stable strobe and its cycle-acknowledge
// comes back within one clock. The internal state machine runs on the rising
// edge.
//
// Client handshake: a client holds req[i] with its request until ready[i]
// (one cycle, the request is then taken); done[i] pulses for one cycle when
// the access has ended, with rdata valid for reads and err set when the link
// chip did not acknowledge within TIMEOUT cycles. Back-to-back accesses take
// two clocks each.
//
// Pins: cs_n is a one-clock strobe with addr, wr and (for writes) dout and
// doe; the link chip answers with ca_n low for one clock and, for a read,
// data on din. The data bus is split into in/out/enable; the tristate
// buffer sits in the pad ring.
// The falling-edge interface and the one-clock response follow the design
// description; the signal set, arbitration and timeout are this design's
// choices.
module link_if
  import sv_pkg::*;
#(
  parameter int NREQ    = 4,
  parameter int TIMEOUT = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  // clients
  input  logic [NREQ-1:0]   req,
  input  lreq_t             req_d [NREQ],
  output logic [NREQ-1:0]   ready,
  output logic [NREQ-1:0]   done,
  output logic [31:0]       rdata,
  output logic              err,
  // link-chip pins
  output logic              l_cs_n,
  output logic              l_wr,
  output logic [LA_W-1:0]   l_addr,
  output logic [31:0]       l_dout,
  output logic              l_doe,
  input  logic              l_ca_n,
  input  logic [31:0]       l_din
);
  typedef enum logic [1:0] {S_IDLE, S_STROBE, S_WAIT} state_t;
  state_t state;

  localparam int IW = (NREQ > 1) ? $clog2(NREQ) : 1;
  localparam int TW = $clog2(TIMEOUT + 1);

  lreq_t          cur;
  logic [IW-1:0]  owner;
  logic [TW-1:0]  tmo;
  logic           ca_q;
  logic [31:0]    din_q;
  logic           can_grant, any_req, end_access, timed_out;
  logic [IW-1:0]  pick;

  // fixed-priority choice among waiting clients
  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int i = NREQ - 1; i >= 0; i--) begin
      if (req[i]) begin
        any_req = 1'b1;
        pick    = IW'(i);
      end
    end
  end

  assign timed_out  = (state == S_WAIT) && (tmo == TW'(TIMEOUT));
  assign end_access = (state == S_WAIT) && (ca_q || timed_out);
  assign can_grant  = (state == S_IDLE) || end_access;

  always_comb begin
    ready = '0;
    done  = '0;
    if (can_grant && any_req) ready[pick] = 1'b1;
    if (end_access)           done[owner] = 1'b1;
  end
  assign rdata = din_q;
  assign err   = end_access && !ca_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      owner <= '0;
      tmo   <= '0;
    end else begin
      case (state)
        S_STROBE: begin
          state <= S_WAIT;
          tmo   <= '0;
        end
        S_WAIT: if (!end_access) tmo <= tmo + 1'b1;
        default: ;
      endcase
      if (can_grant) begin
        if (any_req) begin
          state <= S_STROBE;
          cur   <= req_d[pick];
          owner <= pick;
        end else begin
          state <= S_IDLE;
        end
      end
    end
  end

  // falling-edge pin registers
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_cs_n <= 1'b1;
      l_wr   <= 1'b0;
      l_addr <= '0;
      l_dout <= '0;
      l_doe  <= 1'b0;
      ca_q   <= 1'b0;
      din_q  <= '0;
    end else begin
      l_cs_n <= !(state == S_STROBE);
      l_wr   <= cur.wr;
      l_addr <= cur.addr;
      l_dout <= cur.wdata;
      l_doe  <= (state == S_STROBE) && cur.wr;
      ca_q   <= !l_ca_n;
      din_q  <= l_din;
    end
  end

  a_one_hot_done: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(done));
  a_grant_only_requested: assert property (@(posedge clk) disable iff (!rst_n) (ready & ~req) == '0);
endmodule
