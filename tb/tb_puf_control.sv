// tb_puf_control: the measurement sequencer, with a small experiment.
// N = 16, four challenges, INIT 4, pulse 8, gap 8 cycles. A model of the
// serial link holds tx_busy high for a set number of cycles after each send.
// Checked for every measurement, sampling between clock edges:
//   - the challenge equals an independent 16-bit LFSR model (taps 16, 15, 13,
//     4 from the default seed) and does not change during the measurement;
//   - init is high for exactly INIT_CYCLES cycles with s low, and has fallen
//     before s rises; init_fall is still high when s rises and low when s
//     falls;
//   - s is high for exactly PULSE_CYCLES cycles;
//   - capture follows GAP_CYCLES + 1 cycles after s falls, send the cycle
//     after capture;
//   - the next measurement waits for the link: from one init rise to the next
//     takes INIT + 1 + PULSE + GAP + 4 + TX cycles.
// At the end done must pulse once, busy fall and index equal 4.
module tb_puf_control;
  localparam int unsigned N = 16, NUM = 4, INIT = 4, P = 8, G = 8, TX = 23;
  logic clk = 0, rst_n, start, tx_busy;
  logic [N-1:0] challenge;
  logic s, init, init_fall, capture, send, busy, done;
  logic [31:0] index;
  int checks = 0, failures = 0;

  puf_control #(.N(N), .NUM_CHALLENGES(NUM), .INIT_CYCLES(INIT), .PULSE_CYCLES(P),
                .GAP_CYCLES(G)) dut (.*);

  always #5 clk = ~clk;

  // serial link model
  int txc = 0;
  always_ff @(posedge clk) begin
    if (send) begin tx_busy <= 1'b1; txc <= TX - 1; end
    else if (txc > 0) txc <= txc - 1;
    else tx_busy <= 1'b0;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [N-1:0] m;
    int t, t_init, t_prev_init, n;
    int dones;
    rst_n = 1; #1 rst_n = 0; start = 0; tx_busy = 0;
    m = 16'hC834;  // low 16 bits of the default seed
    t = 0; t_prev_init = -1; dones = 0;
    #12 rst_n = 1;
    @(negedge clk);
    expect_eq(int'(busy), 0, "busy after reset");
    start = 1; @(negedge clk); start = 0; t++;
    for (int meas = 0; meas < int'(NUM); meas++) begin
      while (!init) begin @(negedge clk); t++; if (done) dones++; end
      t_init = t;
      if (t_prev_init >= 0)
        expect_eq(t_init - t_prev_init, int'(INIT + 1 + P + G + 4 + TX), "measurement period");
      t_prev_init = t_init;
      expect_eq(int'(challenge == m), 1, "challenge sequence");
      n = 0;
      while (init) begin
        expect_eq(int'(s), 0, "s low during init");
        expect_eq(int'(init_fall), 1, "init_fall during init");
        n++; @(negedge clk); t++;
      end
      expect_eq(n, int'(INIT), "init length");
      n = 0;
      while (!s) begin n++; @(negedge clk); t++; end
      expect_eq(n, 1, "init fall to s rise");
      expect_eq(int'(init_fall), 1, "init_fall high at s rise");
      expect_eq(int'(init), 0, "init low at s rise");
      n = 0;
      while (s) begin n++; @(negedge clk); t++; end
      expect_eq(n, int'(P), "pulse length");
      expect_eq(int'(init_fall), 0, "init_fall low at s fall");
      n = 0;
      while (!capture) begin n++; @(negedge clk); t++; end
      expect_eq(n, int'(G + 1), "s fall to capture");
      @(negedge clk); t++;
      expect_eq(int'(send), 1, "send after capture");
      expect_eq(int'(challenge == m), 1, "challenge stable");
      expect_eq(int'(index), meas, "index");
      m = {m[N-2:0], m[15] ^ m[14] ^ m[12] ^ m[3]};
    end
    n = 0;
    while (busy && n < 100) begin n++; @(negedge clk); t++; if (done) dones++; end
    @(negedge clk);
    expect_eq(int'(busy), 0, "busy after experiment");
    expect_eq(dones, 1, "done pulses");
    expect_eq(int'(index), int'(NUM), "final index");
    expect_eq(int'(init), 0, "init idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
