// async_tx: asynchronous FireWire command output.
// Control values computed on the vision board (for example a new focus
// position) are sent to a camera as IEEE 1394 write-quadlet requests, the
// way camera registers are written. On `cmd_valid` (ignored while busy) the
// unit captures destination node, 48-bit register offset and data, and
// writes the four quadlets of the request into the link chip's asynchronous
// transmit FIFO through link_if:
//   q0 {14'b0, spd[1:0], tl[5:0], rt = 2'b01, tcode = 0, pri = 0}
//   q1 {destination_ID, offset[47:32]}   q2 offset[31:0]   q3 data
// the last one to the "send" address; the link chip adds source ID and CRC.
// The transaction label counts up with every request. `busy` is high from
// the command until the last quadlet has been accepted. Counters: requests.
// Sending control values as asynchronous commands follows the design
// description; the FIFO word layout is this design's choice.
module async_tx
  import sv_pkg::*;
#(
  parameter logic [1:0] SPD = 2'd2   // 400 Mbit/s
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  input  logic [15:0] dest_id,
  input  logic [47:0] offset,
  input  logic [31:0] data,
  output logic        busy,
  // link_if client port
  output logic        lreq,
  output lreq_t       lreq_d,
  input  logic        lready,
  input  logic        ldone,
  output logic [15:0] requests
);
  logic [31:0] q [4];
  logic [1:0]  idx;
  logic        wait_done;
  logic [5:0]  tl;

  assign lreq = busy && !wait_done;
  always_comb begin
    lreq_d       = '0;
    lreq_d.wr    = 1'b1;
    lreq_d.wdata = q[idx];
    case (idx)
      2'd0:    lreq_d.addr = LREG_ATF_FIRST;
      2'd3:    lreq_d.addr = LREG_ATF_LAST;
      default: lreq_d.addr = LREG_ATF_CONT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      wait_done <= 1'b0;
      idx       <= '0;
      tl        <= '0;
      requests  <= '0;
      for (int i = 0; i < 4; i++) q[i] <= '0;
    end else if (!busy) begin
      if (cmd_valid) begin
        busy <= 1'b1;
        idx  <= '0;
        q[0] <= {14'b0, SPD, tl, 2'b01, TCODE_WRQ, 4'h0};
        q[1] <= {dest_id, offset[47:32]};
        q[2] <= offset[31:0];
        q[3] <= data;
        tl   <= tl + 1'b1;
      end
    end else if (!wait_done) begin
      if (lready) wait_done <= 1'b1;
    end else if (ldone) begin
      wait_done <= 1'b0;
      idx       <= idx + 1'b1;
      if (idx == 2'd3) begin
        busy     <= 1'b0;
        requests <= requests + 1'b1;
      end
    end
  end
endmodule
