// iso_rx: isochronous receive and frame synchronisation.
// The link chip collects the camera's isochronous packets in its general
// receive FIFO. This unit, a client of link_if, polls the FIFO's fill count,
// reads the waiting quadlets one by one and parses them: a header quadlet
// (data_length[31:16], tag[15:14], channel[13:8], tcode[7:4], sy[3:0]) is
// followed by data_length/4 payload quadlets. Packets of another channel or
// transaction code are skipped. A packet with sy = 1 marks the start of a
// frame (the IIDC camera convention): the pixel counters restart and the
// unit is in sync; payload seen while out of sync is dropped. Each payload
// quadlet carries two pixels in YUV 4:2:2 order U Y0 V Y1 (U in the top
// byte); the two luma samples leave one per clock on the pixel stream with
// their column/row and first/last-of-frame flags, for frames of img_w x img_h.
// Chroma is not used by the processing units and is dropped.
//
// Flow control: a pixel leaves only when out_ready is high; while a pixel
// waits the unit reads no further quadlets, so the link chip's FIFO absorbs
// the burst. An empty poll is followed by POLL_GAP idle clocks so that polling
// leaves the bus to the other clients.
// Counters: frames started, packets skipped.
module iso_rx
  import sv_pkg::*;
#(
  parameter int POLL_GAP = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic [5:0]      channel,
  input  logic [XW-1:0]   img_w,
  input  logic [YW-1:0]   img_h,
  // link_if client port
  output logic            lreq,
  output lreq_t           lreq_d,
  input  logic            lready,
  input  logic            ldone,
  input  logic [31:0]     lrdata,
  // pixel stream
  output logic            out_valid,
  output pix_t            out_pix,
  input  logic            out_ready,
  // status
  output logic            synced,
  output logic [15:0]     frames,
  output logic [15:0]     skipped
);
  typedef enum logic [2:0] {S_POLL, S_POLL_WAIT, S_GAP, S_READ, S_READ_WAIT, S_EMIT0, S_EMIT1} state_t;
  state_t state;

  logic [15:0]   avail;      // quadlets known to be in the link FIFO
  logic [13:0]   pay_left;   // payload quadlets still to come in this packet
  logic          keep;       // current packet is ours
  logic [31:0]   q;
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic [$clog2(POLL_GAP+1)-1:0] gap;

  logic last_col, last_row;
  assign last_col = (col == img_w - 1'b1);
  assign last_row = (row == img_h - 1'b1);

  assign lreq = (state == S_POLL) || (state == S_READ);
  always_comb begin
    lreq_d       = '0;
    lreq_d.wr    = 1'b0;
    lreq_d.addr  = (state == S_POLL) ? LREG_GRF_CNT : LREG_GRF_DATA;
  end

  assign out_valid   = (state == S_EMIT0) || (state == S_EMIT1);
  assign out_pix.y   = (state == S_EMIT0) ? q[23:16] : q[7:0];
  assign out_pix.col = col;
  assign out_pix.row = row;
  assign out_pix.sof = (col == '0) && (row == '0);
  assign out_pix.eof = last_col && last_row;

  // header fields of the quadlet just read
  logic [15:0] h_len;
  logic [5:0]  h_chan;
  logic [3:0]  h_tcode, h_sy;
  assign h_len   = lrdata[31:16];
  assign h_chan  = lrdata[13:8];
  assign h_tcode = lrdata[7:4];
  assign h_sy    = lrdata[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_POLL;
      avail    <= '0;
      pay_left <= '0;
      keep     <= 1'b0;
      q        <= '0;
      col      <= '0;
      row      <= '0;
      gap      <= '0;
      synced   <= 1'b0;
      frames   <= '0;
      skipped  <= '0;
    end else begin
      case (state)
        S_POLL: if (enable && lready) state <= S_POLL_WAIT;
        S_POLL_WAIT: if (ldone) begin
          avail <= lrdata[15:0];
          if (lrdata[15:0] == '0) begin
            state <= S_GAP;
            gap   <= '0;
          end else begin
            state <= S_READ;
          end
        end
        S_GAP: begin
          gap <= gap + 1'b1;
          if (gap == ($bits(gap))'(POLL_GAP - 1)) state <= S_POLL;
        end
        S_READ: if (lready) state <= S_READ_WAIT;
        S_READ_WAIT: if (ldone) begin
          avail <= avail - 1'b1;
          q     <= lrdata;
          if (pay_left == '0) begin
            // header quadlet
            pay_left <= h_len[15:2];
            keep     <= (h_tcode == TCODE_ISO) && (h_chan == channel);
            if ((h_tcode == TCODE_ISO) && (h_chan == channel)) begin
              if (h_sy == 4'd1) begin
                synced <= 1'b1;
                col    <= '0;
                row    <= '0;
                frames <= frames + 1'b1;
              end
            end else begin
              skipped <= skipped + 1'b1;
            end
            state <= (avail == 16'd1) ? S_POLL : S_READ;
          end else begin
            pay_left <= pay_left - 1'b1;
            if (keep && synced) state <= S_EMIT0;
            else                state <= (avail == 16'd1) ? S_POLL : S_READ;
          end
        end
        S_EMIT0, S_EMIT1: if (out_ready) begin
          if (last_col) begin
            col <= '0;
            if (last_row) begin
              row    <= '0;
              synced <= 1'b0;   // frame complete: wait for the next sy
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            col <= col + 1'b1;
          end
          if (state == S_EMIT0 && !(last_col && last_row)) state <= S_EMIT1;
          else state <= (avail == '0) ? S_POLL : S_READ;
        end
        default: state <= S_POLL;
      endcase
    end
  end
endmodule
