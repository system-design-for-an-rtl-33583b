// tb_window3x3: two random 10 x 6 frames enter with random gaps; every
// output window is compared with the 3x3 neighbourhood taken directly from
// the stored frame, and its centre position, interior flag and latency
// (two clocks) are checked.
module tb_window3x3;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int W = 10, H = 6;

  logic in_valid, out_valid;
  pix_t in_pix;
  win_t win;
  wpos_t pos;
  logic [7:0] img [2][H][W];

  window3x3 #(.MAX_W(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, got = 0, interior = 0;
  int vhist [4];
  always @(posedge clk) vhist <= '{in_valid, vhist[0], vhist[1], vhist[2]};

  always @(negedge clk) if (rst_n && out_valid) begin
    int f, n, x, y;
    f = got / (W * H); n = got % (W * H); x = n % W; y = n / W;
    checks++;
    if (vhist[1] != 1) begin failures++; $display("latency wrong at output %0d", got); end
    if (pos.col != XW'(x - 1) || pos.row != YW'(y - 1) || pos.interior != (x >= 2 && y >= 2)
        || pos.eof != (n == W * H - 1)) begin
      failures++; $display("pos wrong at %0d: %0d,%0d", got, pos.col, pos.row);
    end
    if (x >= 2 && y >= 2) begin
      interior++;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        checks++;
        if (win[r][c] != img[f][y - 2 + r][x - 2 + c]) begin
          failures++;
          $display("win[%0d][%0d]=%0d exp %0d at (%0d,%0d)", r, c, win[r][c], img[f][y-2+r][x-2+c], x, y);
        end
      end
    end
    got++;
  end

  initial begin
    in_valid = 0; in_pix = '0;
    for (int f = 0; f < 2; f++) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[f][y][x] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(posedge clk) #1;
          while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(posedge clk) #1; end
          in_valid = 1;
          in_pix = '{y: img[f][y][x], col: XW'(x), row: YW'(y), sof: (x == 0 && y == 0), eof: (x == W-1 && y == H-1)};
        end
    @(posedge clk) #1 in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (got != 2 * W * H || interior != 2 * (W - 2) * (H - 2)) begin failures++; $display("count %0d %0d", got, interior); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
