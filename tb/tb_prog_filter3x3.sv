// tb_prog_filter3x3: random windows through several coefficient sets
// (identity, box blur /8, Laplace-sharpen, random signed with random shift);
// the clipped, shifted weighted sum is formed in the testbench and compared
// with the output three clocks later.
module tb_prog_filter3x3;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  win_t win;
  wpos_t in_pos, out_pos;
  logic [8:0][7:0] coef;
  logic [3:0] shift;
  logic [7:0] pix;

  prog_filter3x3 dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [$];
  int clipped_lo = 0, clipped_hi = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (pix != 8'(e)) begin failures++; $display("pix %0d exp %0d", pix, e); end
    end
  end

  initial begin
    in_valid = 0; win = '0; in_pos = '0; coef = '0; shift = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 4; set++) begin
      case (set)
        0: begin coef = '0; coef[4] = 8'd1; shift = 0; end
        1: begin for (int k = 0; k < 9; k++) coef[k] = 8'd1; coef[4] = 8'd0; shift = 3; end
        2: begin coef = '0; coef[1] = 8'hFF; coef[3] = 8'hFF; coef[5] = 8'hFF; coef[7] = 8'hFF; coef[4] = 8'd5; shift = 0; end
        default: begin for (int k = 0; k < 9; k++) coef[k] = 8'($urandom); shift = 4'($urandom_range(0, 9)); end
      endcase
      for (int i = 0; i < 300; i++) begin
        int s;
        @(posedge clk) #1;
        in_valid = ($urandom_range(0, 4) != 0);
        if (!in_valid) continue;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = 8'($urandom);
        s = 0;
        for (int k = 0; k < 9; k++) s += int'(win[k / 3][k % 3]) * int'($signed(coef[k]));
        s = s >>> shift;
        if (s < 0) begin s = 0; clipped_lo++; end
        if (s > 255) begin s = 255; clipped_hi++; end
        exp_q.push_back(s);
      end
      @(posedge clk) #1 in_valid = 0;
      repeat (5) @(posedge clk);
    end
    checks++;
    if (exp_q.size() != 0 || clipped_lo == 0 || clipped_hi == 0) begin failures++; $display("left %0d clip %0d %0d", exp_q.size(), clipped_lo, clipped_hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
