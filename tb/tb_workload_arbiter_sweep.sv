// tb_workload_arbiter_sweep: the arbiter configurations the PUF was evaluated
// with, run through the whole system (128 stages, one MA-PUF per kind).
//   - chain-length study: the arbiter after 2, 3, 4, 5, 6, 7, 8, 16, 32, 64
//     and 128 stages (adr = length - 1);
//   - correlation study: the last eight arbiters, 121..128 (adr 120..127).
// Each configuration is one experiment of 8 challenges. As in
// tb_mapuf_system, the lower chain inputs receive S delayed by 3 units, so the
// expected response of the arbiter after L stages follows from the parity of
// the first L challenge bits; every captured word is checked against it and
// against the word received from the serial output. The testbench also
// tallies the 4-DFF codes and the ternary values, the quantities plotted for
// the real device, and prints them; in this idealised race only the two
// stable codes can occur, which is checked.
module tb_workload_arbiter_sweep;
  import puf_pkg::*;
  localparam int unsigned N = 128, NUM = 8, BAUD = 2, RESP_W = 16;

  logic clk = 0, rst_n, start;
  logic [6:0] adr;
  logic busy, done, resp_valid, uart_txd;
  logic [31:0] index;
  logic [RESP_W-1:0] resp;
  int checks = 0, failures = 0;

  mapuf_system #(.N(N), .NUM_CHALLENGES(NUM), .BAUD_DIV(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic s_d3 = 0;
  always @(dut.s) s_d3 <= #3 dut.s;
  initial begin
    force dut.u_apuf.s_bot = s_d3;
    force dut.g_ma[0].u_dff.s_bot  = s_d3;
    force dut.g_ma[0].u_4dff.s_bot = s_d3;
    force dut.g_ma[0].u_sr.s_bot   = s_d3;
    force dut.g_ma[0].u_cnt.s_bot  = s_d3;
  end

  function automatic logic [RESP_W-1:0] expected(logic [N-1:0] ch, int unsigned a);
    bit par, par_all;
    par = 0;
    for (int k = 0; k <= int'(a); k++) par ^= ch[k];
    par_all = 0;
    for (int k = 0; k < int'(N); k++) par_all ^= ch[k];
    return {(par ? 8'd0 : 8'd1), (par ? 2'b00 : 2'b01), (par ? 4'b0110 : 4'b1001),
            !par, !par_all};
  endfunction

  int code_hist [16];
  int trit_hist [3];
  logic [N-1:0] m = 128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834;
  logic [RESP_W-1:0] words [$];

  always @(posedge clk) begin
    if (resp_valid) begin
      checks++;
      if (dut.challenge !== m || resp !== expected(m, int'(adr))) begin
        failures++;
        $display("FAIL adr %0d: resp %h expected %h", adr, resp, expected(m, int'(adr)));
      end
      words.push_back(resp);
      code_hist[resp[5:2]]++;
      trit_hist[decode_4dff(resp[5:2])]++;
      trit_hist[decode_sr(resp[7:6])]++;
      m = {m[N-2:0], m[127] ^ m[125] ^ m[100] ^ m[98]};
    end
  end

  int n_rx = 0;
  initial begin
    logic [15:0] w;
    forever begin
      for (int b = 0; b < 2; b++) begin
        @(negedge uart_txd);
        repeat (BAUD / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (BAUD) @(posedge clk);
          w[8*b + i] = uart_txd;
        end
        repeat (BAUD) @(posedge clk);
      end
      checks++;
      if (words.size() == 0 || w !== words[0]) begin
        failures++;
        $display("FAIL serial word %0d: %h", n_rx, w);
      end
      if (words.size() != 0) void'(words.pop_front());
      n_rx++;
    end
  end

  initial begin
    static int lengths [19] = '{2, 3, 4, 5, 6, 7, 8, 16, 32, 64, 128,
                                121, 122, 123, 124, 125, 126, 127, 128};
    rst_n = 1; start = 0; adr = '0;
    #1 rst_n = 0;
    #21 rst_n = 1;
    foreach (lengths[c]) begin
      @(negedge clk);
      adr = 7'(lengths[c] - 1);
      start = 1; @(negedge clk); start = 0;
      wait (done);
      @(negedge clk);
      checks++;
      if (index != NUM) begin failures++; $display("FAIL experiment for length %0d", lengths[c]); end
    end
    repeat (40 * BAUD) @(negedge clk);
    checks++;
    if (n_rx != 19 * NUM) begin failures++; $display("FAIL %0d words received", n_rx); end
    $display("4-DFF code histogram (R^3..R^0):");
    for (int c = 0; c < 16; c++) if (code_hist[c] != 0) $display("  %b : %0d", 4'(c), code_hist[c]);
    $display("ternary values: 0=%0d 1=%0d X=%0d", trit_hist[TRIT_0], trit_hist[TRIT_1], trit_hist[TRIT_X]);
    checks++;
    if (code_hist[4'b1001] + code_hist[4'b0110] != 19 * NUM || trit_hist[TRIT_X] != 0) begin
      failures++;
      $display("FAIL unexpected codes in a clean race");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
