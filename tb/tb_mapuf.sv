// tb_mapuf: multi-arbiter PUFs of all four arbiter kinds, 128 stages each.
// As in tb_apuf the delay difference is injected at the chain inputs: the
// start pulse enters one side a few time units before the other, on both its
// rising and its falling edge. Arbiter k then sees the leading edge on its
// upper input exactly when (upper input first) XOR (parity of ch[0..k]) is 1.
// Expected outputs for every arbiter, computed here:
//   single DFF : 1 if upper leads, else 0
//   4-DFF      : 1001 if upper leads, else 0110 (both stable)
//   SR latch   : upper falls first -> R^0R^1 = 1,0 (stable zero), else 0,0
//   SR counter : 1 if upper falls first, else 0
// All arbiter outputs are checked, and the multiplexer output for a random
// address. The SR-latch MA-PUFs have their own clear, init_sr, held high
// across the rising edge and released before the falling race, as the
// system's control does.
module tb_mapuf;
  import puf_pkg::*;
  localparam int unsigned N = 128;
  logic         init, init_sr, s_top, s_bot;
  logic [N-1:0] ch;
  logic [6:0]   adr;
  logic [0:0]   r_dff;
  logic [3:0]   r_4dff;
  logic [1:0]   r_sr;
  logic [7:0]   r_cnt;
  logic [N-1:0]   all_dff;
  logic [4*N-1:0] all_4dff;
  logic [2*N-1:0] all_sr;
  logic [8*N-1:0] all_cnt;
  int checks = 0, failures = 0;

  mapuf #(.N(N), .ARB(ARB_DFF))    u_dff  (.init, .s_top, .s_bot, .ch, .adr, .r(r_dff),  .arb_all(all_dff));
  mapuf #(.N(N), .ARB(ARB_4DFF))   u_4dff (.init, .s_top, .s_bot, .ch, .adr, .r(r_4dff), .arb_all(all_4dff));
  mapuf #(.N(N), .ARB(ARB_SR))     u_sr   (.init(init_sr), .s_top, .s_bot, .ch, .adr, .r(r_sr),   .arb_all(all_sr));
  mapuf #(.N(N), .ARB(ARB_SR_CNT)) u_cnt  (.init(init_sr), .s_top, .s_bot, .ch, .adr, .r(r_cnt),  .arb_all(all_cnt));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s arbiter %0d", what, k);
    end
  endtask

  initial begin
    s_top = 0; s_bot = 0; init = 0; init_sr = 0;
    #1 init = 1; init_sr = 1; ch = '0; adr = '0;
    #10;
    for (int i = 0; i < 100; i++) begin
      bit top_first, par;
      bit lead [N];
      for (int b = 0; b < int'(N); b++) ch[b] = 1'($urandom);
      adr = 7'($urandom_range(N - 1));
      top_first = 1'($urandom);
      par = 0;
      for (int k = 0; k < int'(N); k++) begin
        par ^= ch[k];
        lead[k] = top_first ^ par;   // 1: upper input of arbiter k leads
      end
      init = 1; init_sr = 1; #5; init = 0; #5;
      if (top_first) begin s_top = 1; #3; s_bot = 1; end
      else           begin s_bot = 1; #3; s_top = 1; end
      #10; init_sr = 0; #10;
      if (top_first) begin s_top = 0; #3; s_bot = 0; end
      else           begin s_bot = 0; #3; s_top = 0; end
      #5;
      for (int k = 0; k < int'(N); k++) begin
        check(all_dff[k] == lead[k], "dff", k);
        check(all_4dff[4*k +: 4] == (lead[k] ? 4'b1001 : 4'b0110), "4dff", k);
        check(all_sr[2*k +: 2] == (lead[k] ? 2'b01 : 2'b00), "sr", k);
        check(all_cnt[8*k +: 8] == (lead[k] ? 8'd1 : 8'd0), "cnt", k);
      end
      check(r_dff  == all_dff[adr],            "mux dff", int'(adr));
      check(r_4dff == all_4dff[4*adr +: 4],    "mux 4dff", int'(adr));
      check(r_sr   == all_sr[2*adr +: 2],      "mux sr", int'(adr));
      check(r_cnt  == all_cnt[8*adr +: 8],     "mux cnt", int'(adr));
      check(decode_4dff(r_4dff) == (lead[adr] ? TRIT_1 : TRIT_0), "ternary 4dff", int'(adr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
