// tb_sr_latch_arbiter: falling-edge races into the SR-latch arbiter.
// Both inputs start high. A race in which s1 falls first must give R^0R^1 =
// 1,0 (stable zero); one in which s2 falls first must give 0,0 (stable one).
// Oscillation is produced by toggling s1 several times while s2 stays high,
// so that the latch output rises more than once: R^0R^1 must become 1,1 (X).
// Init must clear both bits.
module tb_sr_latch_arbiter;
  import puf_pkg::*;
  logic init, s1, s2;
  logic [1:0] r;
  int checks = 0, failures = 0;

  sr_latch_arbiter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic arm();
    s1 = 1; s2 = 1; #5;
    init = 1; #5; init = 0; #5;
    checks++;
    if (r !== 2'b00) begin failures++; $display("FAIL init r=%b", r); end
  endtask

  initial begin
    init = 0; s1 = 1; s2 = 1;
    #1 init = 1;
    #10;
    for (int i = 0; i < 200; i++) begin
      bit s1_first;
      int unsigned lag;
      s1_first = 1'($urandom);
      lag = 1 + $urandom_range(9);
      arm();
      if (s1_first) begin s1 = 0; #(lag); s2 = 0; end
      else          begin s2 = 0; #(lag); s1 = 0; end
      #5;
      checks++;
      if (r !== (s1_first ? 2'b01 : 2'b00)) begin
        failures++;
        $display("FAIL race s1_first=%0b r=%b", s1_first, r);
      end
      checks++;
      if (decode_sr(r) != (s1_first ? TRIT_0 : TRIT_1)) begin
        failures++;
        $display("FAIL decode %b", r);
      end
    end
    for (int i = 0; i < 20; i++) begin
      int unsigned k;
      k = 2 + $urandom_range(5);
      arm();
      for (int j = 0; j < int'(k); j++) begin
        s1 = 0; #2; s1 = 1; #2;
      end
      s1 = 0; s2 = 0; #5;
      checks++;
      if (r !== 2'b11 || decode_sr(r) != TRIT_X) begin
        failures++;
        $display("FAIL oscillation k=%0d r=%b", k, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
