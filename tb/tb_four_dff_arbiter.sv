// tb_four_dff_arbiter: races two pulses into the 4-DFF arbiter.
// Each race chooses independently which path leads on the rising edge and
// which on the falling edge, and by how much. The expected four bits are
// worked out from the sampling rule (each path sampled on both edges of the
// other), then decoded: the same leader on both edges must give a stable
// 1 (upper first, code 1001) or 0 (lower first, code 0110); a change of leader
// between the edges must give a code decoded as X. The two example waveforms
// of the published design are the first two races.
module tb_four_dff_arbiter;
  import puf_pkg::*;
  logic init, s1, s2;
  logic [3:0] r;
  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_x = 0;

  four_dff_arbiter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic race(bit s1_rise_first, bit s1_fall_first, int unsigned lag_r, int unsigned lag_f);
    logic [3:0] exp;
    trit_e t_exp;
    init = 1; #5; init = 0; #5;
    checks++;
    if (r !== 4'b0000) begin failures++; $display("FAIL init"); end
    if (s1_rise_first) begin s1 = 1; #(lag_r); s2 = 1; end
    else               begin s2 = 1; #(lag_r); s1 = 1; end
    #20;
    if (s1_fall_first) begin s1 = 0; #(lag_f); s2 = 0; end
    else               begin s2 = 0; #(lag_f); s1 = 0; end
    #5;
    exp[0] = s1_rise_first;   // s1 at the rising edge of s2
    exp[1] = !s1_rise_first;  // s2 at the rising edge of s1
    exp[2] = !s1_fall_first;  // s1 at the falling edge of s2
    exp[3] = s1_fall_first;   // s2 at the falling edge of s1
    if (s1_rise_first == s1_fall_first) t_exp = s1_rise_first ? TRIT_1 : TRIT_0;
    else t_exp = TRIT_X;
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL r=%b expected %b (rise1st=%0b fall1st=%0b)", r, exp, s1_rise_first, s1_fall_first);
    end
    checks++;
    if (decode_4dff(r) != t_exp) begin
      failures++;
      $display("FAIL decode of %b", r);
    end
    case (decode_4dff(r))
      TRIT_1:  n_one++;
      TRIT_0:  n_zero++;
      default: n_x++;
    endcase
  endtask

  initial begin
    s1 = 0; s2 = 0; init = 0;
    #1 init = 1;
    #10;
    // s1 leads both edges: R^0..R^3 = 1,0,0,1 (r = 4'b1001)
    race(1, 1, 5, 5);
    checks++; if (r !== 4'b1001) begin failures++; $display("FAIL example 1"); end
    // s2 leads both edges: R^0..R^3 = 0,1,1,0 (r = 4'b0110)
    race(0, 0, 5, 5);
    checks++; if (r !== 4'b0110) begin failures++; $display("FAIL example 2"); end
    for (int i = 0; i < 300; i++)
      race(1'($urandom), 1'($urandom), 1 + $urandom_range(9), 1 + $urandom_range(9));
    checks++;
    if (n_one == 0 || n_zero == 0 || n_x == 0) begin
      failures++;
      $display("FAIL not every outcome seen: one=%0d zero=%0d x=%0d", n_one, n_zero, n_x);
    end
    $display("outcomes: one=%0d zero=%0d x=%0d", n_one, n_zero, n_x);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
