// tb_sync_fifo: random pushes and pops against a reference queue; checks
// data order, empty/full/level and that nothing is lost at the full mark.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int W = 12, D = 8;
  logic push, pop, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [3:0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_q [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int saw_full = 0;
  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (ref_q.size() == 0) || full != (ref_q.size() == D) || level != 4'(ref_q.size())) begin
        failures++;
        $display("flag mismatch size=%0d empty=%b full=%b level=%0d", ref_q.size(), empty, full, level);
      end
      if (!empty) begin
        checks++;
        if (rdata !== ref_q[0]) begin failures++; $display("data %h exp %h", rdata, ref_q[0]); end
      end
      if (full) saw_full++;
      // phases: mostly push, then mostly pop
      push = !full && ($urandom_range(0, 99) < ((i / 300) % 2 ? 30 : 75));
      pop  = !empty && ($urandom_range(0, 99) < ((i / 300) % 2 ? 75 : 30));
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (pop)  void'(ref_q.pop_front());
      if (push) ref_q.push_back(wdata);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
