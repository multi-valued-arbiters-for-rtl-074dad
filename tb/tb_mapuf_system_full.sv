// tb_mapuf_system_full: one complete measurement of the PUF test system with
// every parameter at its default (128 stages, one MA-PUF of each arbiter kind,
// 10,000-challenge experiment, 868 cycles per serial bit).
//
// As in tb_mapuf_system, the lower input of every chain is forced to a copy of
// S delayed by 3 units, so the upper entry wins every race and arbiter k sees
// the leading edge on its upper input exactly when the parity of ch[0..k] is
// even. The first two measurements of the experiment are checked: the
// captured word against that expectation (challenge from an independent LFSR
// model), the serial word against the captured one, and the time from start
// to the first captured word (INIT + 1 + PULSE + GAP + 3 = 72 cycles).
module tb_mapuf_system_full;
  import puf_pkg::*;
  localparam int unsigned N = 128, RESP_W = 16, BAUD = 868;

  logic clk = 0, rst_n, start;
  logic [6:0] adr;
  logic busy, done, resp_valid, uart_txd;
  logic [31:0] index;
  logic [RESP_W-1:0] resp;
  int checks = 0, failures = 0;

  mapuf_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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
    // {count, SR R^1 R^0, 4-DFF R^3..R^0, DFF, A-PUF}
    return {(par ? 8'd0 : 8'd1), (par ? 2'b00 : 2'b01), (par ? 4'b0110 : 4'b1001),
            !par, !par_all};
  endfunction

  initial begin
    logic [N-1:0] m;
    logic [7:0] b;
    logic [15:0] w;
    int t;
    m = 128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834;
    rst_n = 1; #1 rst_n = 0; start = 0; adr = 7'd100;
    #22 rst_n = 1;
    for (int meas = 0; meas < 2; meas++) begin
      if (meas == 0) begin
        @(negedge clk); start = 1; @(negedge clk); start = 0;
        t = 1;
        while (!resp_valid) begin @(negedge clk); t++; end
        checks++;
        if (t != 72) begin failures++; $display("FAIL start to first word: %0d cycles", t); end
      end else begin
        while (!resp_valid) @(negedge clk);
      end
      checks++;
      if (dut.challenge !== m) begin failures++; $display("FAIL challenge %0d", meas); end
      checks++;
      if (resp !== expected(m, 100)) begin
        failures++;
        $display("FAIL measurement %0d: resp %h expected %h", meas, resp, expected(m, 100));
      end
      for (int by = 0; by < 2; by++) begin
        @(negedge uart_txd);
        repeat (BAUD / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (BAUD) @(posedge clk);
          b[i] = uart_txd;
        end
        w[8*by +: 8] = b;
        repeat (BAUD) @(posedge clk);
      end
      checks++;
      if (w !== resp) begin failures++; $display("FAIL serial word %h, resp %h", w, resp); end
      checks++;
      if (index != 32'(meas) || !busy) begin failures++; $display("FAIL index %0d", index); end
      $display("measurement %0d: challenge %h response %h", meas, m, resp);
      m = {m[N-2:0], m[127] ^ m[125] ^ m[100] ^ m[98]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
