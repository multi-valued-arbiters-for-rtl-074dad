// tb_response_reg: the response register.
// Random words are offered on d every cycle; q must change only in the cycle
// after load, to the word offered with load, and valid must follow load by one
// cycle. Reset must clear q and valid.
module tb_response_reg;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n, load, valid;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  response_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    logic exp_v;
    rst_n = 1; #1 rst_n = 0; load = 0; d = '1;
    #12;
    checks++;
    if (q !== '0 || valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    exp = '0; exp_v = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = W'($urandom);
      load = ($urandom_range(3) == 0);
      if (load) exp = d;
      exp_v = load;
      @(negedge clk);
      load = 0;
      checks++;
      if (q !== exp || valid !== exp_v) begin
        failures++;
        $display("FAIL i=%0d q=%h exp=%h valid=%b", i, q, exp, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
