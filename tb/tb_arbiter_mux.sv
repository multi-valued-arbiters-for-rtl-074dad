// tb_arbiter_mux: the arbiter multiplexer at N = 128 arbiters of 4 bits.
// For random arbiter words every address is applied and the output is
// compared with the word's slice picked by a loop in the testbench.
module tb_arbiter_mux;
  localparam int unsigned N = 128, W = 4;
  logic [N*W-1:0] arb;
  logic [6:0]     adr;
  logic [W-1:0]   r;
  int checks = 0, failures = 0;

  arbiter_mux #(.N(N), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < N*W; i++) arb[i] = 1'($urandom);
      for (int a = 0; a < N; a++) begin
        logic [W-1:0] exp;
        adr = 7'(a);
        for (int b = 0; b < int'(W); b++) exp[b] = arb[a*W + b];
        #1;
        checks++;
        if (r !== exp) begin
          failures++;
          $display("FAIL adr=%0d r=%h exp=%h", a, r, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
