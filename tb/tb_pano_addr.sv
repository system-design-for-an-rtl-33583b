// tb_pano_addr: after the angle-table set-up (its length is checked against
// the 17 clocks per column of the iterative CORDIC), source coordinates for
// random columns and radii are compared with cx + r*cos(2*pi*a/PANO_W),
// cy + r*sin(...) computed in floating point; the error must stay below
// 1/8 pixel for radii up to 500.
module tb_pano_addr;
  import sv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int PW = 64;
  localparam real PI = 3.14159265358979;

  logic init, busy, req, out_valid;
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  logic [5:0] a;
  logic [9:0] r;
  logic signed [20:0] x_fx, y_fx;

  pano_addr #(.PANO_W(PW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    real ex, ey, dx, dy;
    init = 0; req = 0; a = 0; r = 0; cx = XW'(640); cy = YW'(480);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk) #1 init = 1;
    @(posedge clk) #1 init = 0;
    cyc = 0;
    while (busy) begin @(posedge clk) #1; cyc++; end
    checks++;
    if (cyc < 17 * PW - 2 || cyc > 17 * PW + 4) begin failures++; $display("set-up took %0d clocks", cyc); end
    for (int i = 0; i < 300; i++) begin
      a = (i < PW) ? 6'(i) : 6'($urandom);
      r = (i < PW) ? 10'd500 : 10'($urandom_range(0, 500));
      req = 1;
      @(posedge clk) #1 req = 0;
      @(posedge clk) #1;
      checks++;
      if (!out_valid) begin failures++; $display("no output"); end
      ex = 640.0 + r * $cos(2.0 * PI * a / PW);
      ey = 480.0 + r * $sin(2.0 * PI * a / PW);
      dx = $itor(x_fx) / 256.0 - ex;
      dy = $itor(y_fx) / 256.0 - ey;
      if (dx > 0.125 || dx < -0.125 || dy > 0.125 || dy < -0.125) begin
        failures++; $display("a=%0d r=%0d: (%f,%f) exp (%f,%f)", a, r, $itor(x_fx)/256.0, $itor(y_fx)/256.0, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
