// tb_tpg: the test pulse generator with its default lengths (32 + 32).
// After fire, s must be high for exactly 32 cycles, mid must pulse once while
// s is high, after 16 cycles of it, and done must pulse once, 32 cycles after
// s fell. A fire while the generator is busy must be ignored.
module tb_tpg;
  localparam int unsigned P = 32, G = 32;
  logic clk = 0, rst_n, fire, s, mid, done;
  int checks = 0, failures = 0;

  tpg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi, lo, dones, mids, mid_at;
    rst_n = 1; #1 rst_n = 0; fire = 0;
    #12 rst_n = 1;
    checks++;
    if (s !== 1'b0 || done !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk); fire = 1;
      @(negedge clk); fire = (rep == 1);  // rep 1: keep fire high while busy
      hi = 0; lo = 0; dones = 0; mids = 0; mid_at = -1;
      while (s) begin
        if (mid) begin mids++; mid_at = hi; end
        hi++; @(negedge clk); if (done) dones++;
      end
      while (!done && lo < 100) begin if (mid) mids++; lo++; @(negedge clk); end
      fire = 0;
      @(negedge clk);
      checks++;
      if (hi != int'(P)) begin failures++; $display("FAIL high for %0d cycles", hi); end
      checks++;
      if (lo != int'(G)) begin failures++; $display("FAIL done %0d cycles after fall", lo); end
      checks++;
      if (mids != 1 || mid_at != int'(P / 2)) begin failures++; $display("FAIL mid count %0d at %0d", mids, mid_at); end
      checks++;
      if (dones != 0 || done) begin failures++; $display("FAIL done not a single pulse"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
