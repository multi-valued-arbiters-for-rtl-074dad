// tb_sr_counter_arbiter: races and oscillations into the counting arbiter.
// A clean race must leave count 1 (s1 fell first) or 0 (s2 fell first). An
// oscillation of k rising edges of the latch output, produced by toggling s1
// while s2 is high, must leave count k, including more than 255 edges to see
// the 8-bit counter wrap. Init must clear the count.
module tb_sr_counter_arbiter;
  logic init, s1, s2;
  logic [7:0] r;
  int checks = 0, failures = 0;

  sr_counter_arbiter dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic arm();
    s1 = 1; s2 = 1; #5;
    init = 1; #5; init = 0; #5;
    checks++;
    if (r !== 8'd0) begin failures++; $display("FAIL init r=%0d", r); end
  endtask

  initial begin
    init = 0; s1 = 1; s2 = 1;
    #1 init = 1;
    #10;
    for (int i = 0; i < 100; i++) begin
      bit s1_first;
      s1_first = 1'($urandom);
      arm();
      if (s1_first) begin s1 = 0; #3; s2 = 0; end
      else          begin s2 = 0; #3; s1 = 0; end
      #5;
      checks++;
      if (r !== (s1_first ? 8'd1 : 8'd0)) begin
        failures++;
        $display("FAIL race s1_first=%0b r=%0d", s1_first, r);
      end
    end
    for (int i = 0; i < 30; i++) begin
      int unsigned k;
      k = (i == 29) ? 300 : 2 + $urandom_range(40);
      arm();
      // the first fall of s1 gives the first rising edge; k-1 more toggles
      s1 = 0; #2;
      for (int j = 1; j < int'(k); j++) begin
        s1 = 1; #2; s1 = 0; #2;
      end
      s2 = 0; #5;
      checks++;
      if (r !== 8'(k)) begin
        failures++;
        $display("FAIL oscillation k=%0d r=%0d", k, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
