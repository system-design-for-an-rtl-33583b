// tb_laplace3x3: random and extreme windows; |N+S+W+E-4C| is computed in the
// testbench and compared with the output one clock later.
module tb_laplace3x3;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  win_t win;
  wpos_t in_pos, out_pos;
  logic [9:0] mag;

  laplace3x3 dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, n;
    in_valid = 0; win = '0; in_pos = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk) #1;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        win[r][c] = (i < 4) ? ((i[0] ^ (r == 1 && c == 1)) ? 8'd255 : 8'd0) : 8'($urandom);
      in_pos = '{col: XW'(i), row: YW'(i), interior: i[0], eof: i[1]};
      in_valid = 1;
      e = int'(win[0][1]) + int'(win[2][1]) + int'(win[1][0]) + int'(win[1][2]) - 4 * int'(win[1][1]);
      if (e < 0) e = -e;
      n = i;
      @(posedge clk) #1;
      in_valid = 0;
      checks++;
      if (!out_valid || mag != 10'(e) || out_pos.col != XW'(n) || out_pos.interior != n[0]) begin
        failures++; $display("mag %0d exp %0d", mag, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
