// iso_tx: generation of an isochronous data stream towards the host.
// Processed pixels are taken from a FIFO (first-word fall-through: `empty`,
// `data`, `pop`) and packed four to a quadlet, the first pixel in the top
// byte (8-bit monochrome). Up to PKT_Q quadlets are collected in an on-chip
// packet buffer; the packet is closed when it is full or when the frame's
// last pixel arrives (a partly filled last quadlet is padded with zeros).
// The packet then goes to the link chip's isochronous transmit FIFO through
// link_if: a header quadlet {data_length, tag, channel, tcode = 0xA, sy},
// then the payload, the last quadlet written to the "send" address. sy = 1
// marks the packet that begins a frame, the same convention the receive side
// uses. The link chip sends the packet in the next 125 us isochronous cycle.
// While a packet is being written out no pixels are taken; the FIFO in front
// absorbs them. Counters: packets sent.
// Sending processed images as an isochronous stream follows the design
// description; packet size, pixel format and tag are this design's choices.
module iso_tx
  import sv_pkg::*;
#(
  parameter int PKT_Q = 160
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic [5:0]      channel,
  // pixel FIFO
  input  logic            in_empty,
  input  pix_t            in_pix,
  output logic            in_pop,
  // link_if client port
  output logic            lreq,
  output lreq_t           lreq_d,
  input  logic            lready,
  input  logic            ldone,
  // status
  output logic [15:0]     packets
);
  localparam int QW = $clog2(PKT_Q + 1);
  typedef enum logic [1:0] {S_FILL, S_HDR, S_PAY, S_WAIT} state_t;
  state_t state, after;

  logic [31:0]   buffer [PKT_Q];
  logic [31:0]   word;
  logic [1:0]    byte_n;
  logic [QW-1:0] nq, sent;
  logic          sy_pending, pkt_sy;
  logic          lreq_d_was_pay;   // the access in flight carries payload
  logic [31:0]   cur_q;

  // a quadlet completes with the 4th byte or with the frame's last pixel
  logic [31:0] word_next;
  always_comb begin
    word_next = word;
    case (byte_n)
      2'd0: word_next = {in_pix.y, 24'h0};
      2'd1: word_next[23:16] = in_pix.y;
      2'd2: word_next[15:8]  = in_pix.y;
      default: word_next[7:0] = in_pix.y;
    endcase
  end

  assign in_pop = (state == S_FILL) && enable && !in_empty;
  assign cur_q  = buffer[sent];

  always_comb begin
    lreq_d = '0;
    lreq_d.wr = 1'b1;
    if (state == S_HDR) begin
      lreq_d.addr  = LREG_ITF_FIRST;
      lreq_d.wdata = {16'(nq) << 2, 2'b01, channel, TCODE_ISO, pkt_sy ? 4'd1 : 4'd0};
    end else begin
      lreq_d.addr  = (sent == nq - 1'b1) ? LREG_ITF_LAST : LREG_ITF_CONT;
      lreq_d.wdata = cur_q;
    end
  end
  assign lreq = (state == S_HDR) || (state == S_PAY);

  always_ff @(posedge clk) begin
    if (in_pop && (byte_n == 2'd3 || in_pix.eof)) buffer[nq] <= word_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_FILL;
      after      <= S_FILL;
      word       <= '0;
      byte_n     <= '0;
      nq         <= '0;
      sent       <= '0;
      sy_pending <= 1'b0;
      pkt_sy     <= 1'b0;
      packets    <= '0;
    end else begin
      case (state)
        S_FILL: if (in_pop) begin
          word <= word_next;
          if (in_pix.sof) sy_pending <= 1'b1;
          if (byte_n == 2'd3 || in_pix.eof) begin
            byte_n <= '0;
            nq     <= nq + 1'b1;
            if (nq == QW'(PKT_Q - 1) || in_pix.eof) begin
              state <= S_HDR;
              pkt_sy <= sy_pending || in_pix.sof;
              sy_pending <= 1'b0;
              sent  <= '0;
            end
          end else begin
            byte_n <= byte_n + 1'b1;
          end
        end
        S_HDR: if (lready) begin
          state <= S_WAIT;
          after <= S_PAY;
        end
        S_PAY: if (lready) begin
          state <= S_WAIT;
          after <= (sent == nq - 1'b1) ? S_FILL : S_PAY;
        end
        S_WAIT: if (ldone) begin
          state <= after;
          if (after == S_FILL) begin
            nq      <= '0;
            packets <= packets + 1'b1;
          end
          // sent counts payload quadlets written; the header does not count
          if (lreq_d_was_pay) sent <= sent + 1'b1;
        end
        default: state <= S_FILL;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lreq_d_was_pay <= 1'b0;
    else if (lready) lreq_d_was_pay <= (state == S_PAY);
  end
endmodule
