// tb_lfsr: the challenge LFSR.
// At N = 8 the register must run through all 255 non-zero states before
// repeating. At N = 128 its sequence is compared for 2000 steps with a model
// that shifts in the XOR of bits 128, 126, 101 and 99 (1-based). Holding step
// low must hold the value, and reset must load the seed (for N = 8 the low
// byte of the default seed, 8'h34).
module tb_lfsr;
  logic clk = 0, rst_n;
  logic step8, step128;
  logic [7:0]   q8;
  logic [127:0] q128;
  int checks = 0, failures = 0;

  localparam logic [127:0] SEED = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;

  lfsr #(.N(8))                 u8   (.clk, .rst_n, .step(step8),   .q(q8));
  lfsr #(.N(128), .SEED(SEED))  u128 (.clk, .rst_n, .step(step128), .q(q128));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] m;
    bit seen [256];
    int unsigned period;
    rst_n = 1; #1 rst_n = 0; step8 = 0; step128 = 0;
    #12 rst_n = 1;
    checks++;
    if (q8 !== 8'h34 || q128 !== SEED) begin failures++; $display("FAIL seed"); end
    // hold
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q8 !== 8'h34 || q128 !== SEED) begin failures++; $display("FAIL hold"); end
    // period of the 8-bit register
    period = 0;
    step8 = 1;
    do begin
      @(posedge clk); #1;
      period++;
      checks++;
      if (q8 == 8'd0 || (seen[q8] && q8 != 8'h34)) begin
        failures++; $display("FAIL state %0d repeated or zero", q8);
        break;
      end
      seen[q8] = 1;
    end while (q8 != 8'h34 && period < 300);
    step8 = 0;
    checks++;
    if (period != 255) begin failures++; $display("FAIL period %0d", period); end
    // 128-bit sequence
    m = SEED;
    step128 = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      m = {m[126:0], m[127] ^ m[125] ^ m[100] ^ m[98]};
      checks++;
      if (q128 !== m) begin failures++; $display("FAIL step %0d", i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
