// tb_focus_sum: three frames of random magnitudes over a 20 x 12 frame with
// different focus regions; the expected per-frame sum over the region is
// formed in the testbench. Checks value, the one-clock valid pulse at frame
// end, and that the accumulator restarts for each frame.
module tb_focus_sum;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 20, H = 12;
  logic in_valid, sum_valid;
  logic [9:0] mag;
  wpos_t pos;
  logic [XW-1:0] roi_x, roi_w;
  logic [YW-1:0] roi_y, roi_h;
  logic [31:0] sum;

  focus_sum dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pulses = 0;
  always @(posedge clk) if (rst_n && sum_valid) pulses++;

  initial begin
    longint exp_sum;
    in_valid = 0; mag = 0; pos = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      roi_x = XW'(2 + f); roi_y = YW'(1 + f); roi_w = XW'(8 + 3 * f); roi_h = YW'(5 + f);
      exp_sum = 0;
      // the window stream: centre (x-1, y-1) for every pixel (x, y)
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        @(posedge clk) #1;
        in_valid = ($urandom_range(0, 3) != 0);
        mag = 10'($urandom_range(0, 1020));
        pos = '{col: XW'(x - 1), row: YW'(y - 1), interior: (x >= 2 && y >= 2), eof: (x == W-1 && y == H-1)};
        if (!in_valid) begin x--; continue; end
        if (x >= 2 && y >= 2 && (x - 1) >= roi_x && (x - 1) < roi_x + roi_w && (y - 1) >= roi_y && (y - 1) < roi_y + roi_h)
          exp_sum += mag;
      end
      @(posedge clk) #1 in_valid = 0;
      checks++;
      if (!sum_valid || sum != 32'(exp_sum)) begin failures++; $display("frame %0d sum %0d exp %0d valid %b", f, sum, exp_sum, sum_valid); end
      @(posedge clk) #1;
      checks++;
      if (sum_valid) begin failures++; $display("valid longer than one clock"); end
    end
    checks++;
    if (pulses != 3) begin failures++; $display("pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
