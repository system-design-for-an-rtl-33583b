// tb_bilinear_interp: random pixels and fractions plus the corner cases
// (fractions 0 and 255); the rounded bilinear blend is computed in the
// testbench in floating point and must match within rounding (one step).
// Latency two clocks, one result per clock.
module tb_bilinear_interp;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid, out_valid;
  logic [7:0] p00, p01, p10, p11, fx, fy, out;

  bilinear_interp dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q [$];
  always @(negedge clk) if (rst_n && out_valid) begin
    real e;
    checks++;
    e = exp_q.pop_front();
    if ($itor(out) - e > 1.0 || e - $itor(out) > 1.0) begin failures++; $display("out %0d exp %f", out, e); end
  end

  initial begin
    real ax, ay;
    in_valid = 0; {p00, p01, p10, p11, fx, fy} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk) #1;
      in_valid = 1;
      {p00, p01, p10, p11} = $urandom;
      fx = (i < 4) ? (i[0] ? 8'd255 : 8'd0) : 8'($urandom);
      fy = (i < 4) ? (i[1] ? 8'd255 : 8'd0) : 8'($urandom);
      ax = $itor(fx) / 256.0; ay = $itor(fy) / 256.0;
      exp_q.push_back((1.0 - ay) * ((1.0 - ax) * p00 + ax * p01) + ay * ((1.0 - ax) * p10 + ax * p11));
    end
    @(posedge clk) #1 in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
