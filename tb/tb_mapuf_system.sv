// tb_mapuf_system: end-to-end run of the PUF test system.
//
// The delay chains switch in zero time in simulation, so all paths would tie.
// To give each measurement a known winner, the testbench drives the two
// inputs of every chain with timed copies of the start signal S, forced onto
// the chain inputs. Three phases, one experiment each, with its own Adr:
//   A  clean race: the upper input sees S, the lower S delayed by 3 units.
//   B  changing leader: the upper input rises first but falls last. Every
//      4-DFF arbiter then sees different leaders on the two edges (X).
//   C  oscillation: the SR-latch MA-PUFs get on their upper input a falling
//      edge followed by a short extra pulse, and on their lower input S delayed
//      by 20 units. The latch output of every arbiter whose upper path carries
//      that signal rises twice (SR: X, counter: 2). The other PUFs run phase A.
// The expected response of arbiter k comes from the parity of ch[0..k]: after
// an odd number of crossed stages the signal that entered on top leaves on the
// bottom. The challenge comes from an independent model of the 128-bit LFSR.
// Every captured word is compared with the expectation, and every word
// received from the serial output (by a receiver model) with the captured one.
// Mechanisms counted, each must occur: stable 0 and stable 1 of each arbiter
// kind, X from the 4-DFF and from the SR latch, counter values 0, 1 and 2,
// three different Adr values, three finished experiments.
module tb_mapuf_system;
  import puf_pkg::*;
  localparam int unsigned N = 128, D = 2, NUM = 10, BAUD = 4;
  localparam int unsigned RESP_W = 1 + 15 * D, NBYTES = (RESP_W + 7) / 8;

  logic clk = 0, rst_n, start;
  logic [6:0] adr;
  logic busy, done, resp_valid, uart_txd;
  logic [31:0] index;
  logic [RESP_W-1:0] resp;
  int checks = 0, failures = 0;

  mapuf_system #(.N(N), .D(D), .NUM_CHALLENGES(NUM), .BAUD_DIV(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- timed copies of S ----
  int phase = 0;
  logic s_d3 = 0, s_d20 = 0, s_osc = 0;
  always @(dut.s) s_d3  <= #3 dut.s;
  always @(dut.s) s_d20 <= #20 dut.s;
  always @(posedge dut.s) s_osc = 1'b1;
  always @(negedge dut.s) begin
    s_osc = 1'b0; #4 s_osc = 1'b1; #4 s_osc = 1'b0;
  end

  logic top_a, bot_a, top_sr, bot_sr;
  always_comb begin
    if (phase == 1) begin
      top_a = dut.s | s_d3;    // rises with S, falls 3 late
      bot_a = dut.s & s_d3;    // rises 3 late, falls with S
    end else begin
      top_a = dut.s;
      bot_a = s_d3;
    end
    if (phase == 1) begin
      top_sr = top_a; bot_sr = bot_a;
    end else if (phase == 2) begin
      top_sr = s_osc; bot_sr = s_d20;
    end else begin
      top_sr = top_a; bot_sr = bot_a;
    end
  end

  initial begin
    force dut.u_apuf.s_top = top_a;
    force dut.u_apuf.s_bot = bot_a;
    force dut.g_ma[0].u_dff.s_top  = top_a;  force dut.g_ma[0].u_dff.s_bot  = bot_a;
    force dut.g_ma[1].u_dff.s_top  = top_a;  force dut.g_ma[1].u_dff.s_bot  = bot_a;
    force dut.g_ma[0].u_4dff.s_top = top_a;  force dut.g_ma[0].u_4dff.s_bot = bot_a;
    force dut.g_ma[1].u_4dff.s_top = top_a;  force dut.g_ma[1].u_4dff.s_bot = bot_a;
    force dut.g_ma[0].u_sr.s_top   = top_sr; force dut.g_ma[0].u_sr.s_bot   = bot_sr;
    force dut.g_ma[1].u_sr.s_top   = top_sr; force dut.g_ma[1].u_sr.s_bot   = bot_sr;
    force dut.g_ma[0].u_cnt.s_top  = top_sr; force dut.g_ma[0].u_cnt.s_bot  = bot_sr;
    force dut.g_ma[1].u_cnt.s_top  = top_sr; force dut.g_ma[1].u_cnt.s_bot  = bot_sr;
  end

  // ---- mechanism counters ----
  int n_dff0 = 0, n_dff1 = 0, n_4d0 = 0, n_4d1 = 0, n_4dx = 0;
  int n_sr0 = 0, n_sr1 = 0, n_srx = 0, n_c0 = 0, n_c1 = 0, n_c2 = 0;
  int n_words = 0, n_rx = 0, n_exp = 0;

  // ---- expected response of one measurement ----
  function automatic logic [RESP_W-1:0] expected(logic [N-1:0] ch, int unsigned a, int ph);
    logic [RESP_W-1:0] e;
    bit par, par_all, rise_first, fall_first, s1r, s1f;
    logic [3:0] e4;
    logic [1:0] esr;
    logic [7:0] ecnt;
    rise_first = 1'b1;                 // upper input rises first in every phase
    fall_first = (ph == 1) ? 1'b0 : 1'b1;
    par = 0;
    for (int k = 0; k <= int'(a); k++) par ^= ch[k];
    par_all = 0;
    for (int k = 0; k < int'(N); k++) par_all ^= ch[k];
    s1r = rise_first ^ par;
    s1f = fall_first ^ par;
    e4 = {s1f, !s1f, !s1r, s1r};       // R^3 R^2 R^1 R^0
    if (ph == 2) begin
      esr  = par ? 2'b00 : 2'b11;
      ecnt = par ? 8'd0 : 8'd2;
    end else begin
      esr  = s1f ? 2'b01 : 2'b00;
      ecnt = s1f ? 8'd1 : 8'd0;
    end
    e = '0;
    e[0] = rise_first ^ par_all;
    for (int d = 0; d < int'(D); d++) begin
      e[1 + d] = s1r;
      e[1 + D + 4*d +: 4] = e4;
      e[1 + 5*D + 2*d +: 2] = esr;
      e[1 + 7*D + 8*d +: 8] = ecnt;
    end
    return e;
  endfunction

  // ---- capture checker ----
  logic [N-1:0] m = 128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834;  // LFSR model, default seed
  logic [RESP_W-1:0] words [$];
  always @(posedge clk) begin
    if (resp_valid) begin
      logic [RESP_W-1:0] e;
      e = expected(m, int'(adr), phase);
      checks++;
      if (dut.challenge !== m) begin
        failures++;
        $display("FAIL challenge of measurement %0d", n_words);
      end
      checks++;
      if (resp !== e) begin
        failures++;
        $display("FAIL phase %0d adr %0d: resp %h expected %h", phase, adr, resp, e);
      end
      n_words++;
      words.push_back(resp);
      for (int d = 0; d < int'(D); d++) begin
        if (resp[1 + d]) n_dff1++; else n_dff0++;
        case (decode_4dff(resp[1 + D + 4*d +: 4]))
          TRIT_0: n_4d0++; TRIT_1: n_4d1++; default: n_4dx++;
        endcase
        case (decode_sr(resp[1 + 5*D + 2*d +: 2]))
          TRIT_0: n_sr0++; TRIT_1: n_sr1++; default: n_srx++;
        endcase
        case (resp[1 + 7*D + 8*d +: 8])
          8'd0: n_c0++; 8'd1: n_c1++; 8'd2: n_c2++; default: ;
        endcase
      end
      m = {m[N-2:0], m[127] ^ m[125] ^ m[100] ^ m[98]};
    end
  end

  // ---- serial receiver ----
  initial begin
    logic [8*NBYTES-1:0] w;
    forever begin
      for (int b = 0; b < int'(NBYTES); b++) begin
        @(negedge uart_txd);
        repeat (BAUD / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (BAUD) @(posedge clk);
          w[8*b + i] = uart_txd;
        end
        repeat (BAUD) @(posedge clk);
        checks++;
        if (uart_txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      end
      checks++;
      if (words.size() == 0 || w[RESP_W-1:0] !== words[0]) begin
        failures++;
        $display("FAIL serial word %0d: %h", n_rx, w);
      end
      if (words.size() != 0) void'(words.pop_front());
      n_rx++;
    end
  end

  task automatic count_ok(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    static int adrs [3] = '{5, 127, 64};
    rst_n = 1; #1 rst_n = 0; start = 0; adr = '0;
    #22 rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      @(negedge clk);
      phase = p; adr = 7'(adrs[p]);
      start = 1; @(negedge clk); start = 0;
      wait (done);
      n_exp++;
      @(negedge clk);
      checks++;
      if (index != NUM || busy) begin failures++; $display("FAIL end of experiment %0d", p); end
    end
    repeat (10 * BAUD + 10) @(negedge clk);
    checks++;
    if (n_words != int'(3 * NUM) || n_rx != n_words) begin
      failures++;
      $display("FAIL words captured %0d, received %0d", n_words, n_rx);
    end
    count_ok(n_dff0, "DFF stable 0");
    count_ok(n_dff1, "DFF stable 1");
    count_ok(n_4d0,  "4-DFF stable 0");
    count_ok(n_4d1,  "4-DFF stable 1");
    count_ok(n_4dx,  "4-DFF metastable X");
    count_ok(n_sr0,  "SR stable 0");
    count_ok(n_sr1,  "SR stable 1");
    count_ok(n_srx,  "SR oscillation X");
    count_ok(n_c0,   "counter 0");
    count_ok(n_c1,   "counter 1");
    count_ok(n_c2,   "counter 2 (oscillation)");
    count_ok(n_exp == 3 ? 3 : 0, "experiments / Adr values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
