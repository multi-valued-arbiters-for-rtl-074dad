// tb_apuf: the classical arbiter PUF at its full length of 128 stages.
// The stages carry no delay in simulation, so the testbench creates the delay
// difference itself: it starts the edge on one chain input a few time units
// before the other. The edge entering first then stays first, and the stages
// only decide on which side it leaves: after an odd number of crossed stages
// it arrives on the lower side. The expected response is therefore
// (upper input first) XOR (parity of the challenge), computed here bit by bit.
module tb_apuf;
  localparam int unsigned N = 128;
  logic         init, s_top, s_bot, r;
  logic [N-1:0] ch;
  int checks = 0, failures = 0;

  apuf #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_top = 0; s_bot = 0; init = 0; ch = '0;
    #1 init = 1;
    #10;
    for (int i = 0; i < 300; i++) begin
      bit top_first, par, exp;
      for (int b = 0; b < int'(N); b++) ch[b] = 1'($urandom);
      top_first = 1'($urandom);
      par = 0;
      for (int b = 0; b < int'(N); b++) par ^= ch[b];
      exp = top_first ^ par;
      init = 1; #5; init = 0; #5;
      if (top_first) begin s_top = 1; #3; s_bot = 1; end
      else           begin s_bot = 1; #3; s_top = 1; end
      #5;
      checks++;
      if (r !== exp) begin
        failures++;
        $display("FAIL i=%0d top_first=%0b parity=%0b r=%0b", i, top_first, par, r);
      end
      s_top = 0; s_bot = 0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
