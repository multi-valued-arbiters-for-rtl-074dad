// tb_dff_arbiter: races two rising edges into the classical arbiter.
// For 200 random races the upper edge leads or lags by 1..20 time units; the
// response must be 1 exactly when the upper path leads. Init must clear the
// response, and a falling edge must not change it.
module tb_dff_arbiter;
  logic init, path_top, path_bot, r;
  int checks = 0, failures = 0;

  dff_arbiter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    path_top = 0; path_bot = 0; init = 0;
    #1 init = 1;
    #10;
    for (int i = 0; i < 200; i++) begin
      bit top_first;
      int unsigned lag;
      top_first = 1'($urandom);
      lag = 1 + $urandom_range(19);
      init = 1; #5;
      checks++;
      if (r !== 1'b0) begin failures++; $display("FAIL init did not clear"); end
      init = 0; #5;
      if (top_first) begin path_top = 1; #(lag); path_bot = 1; end
      else           begin path_bot = 1; #(lag); path_top = 1; end
      #5;
      checks++;
      if (r !== top_first) begin
        failures++;
        $display("FAIL race %0d top_first=%0b lag=%0d r=%0b", i, top_first, lag, r);
      end
      path_top = 0; path_bot = 0; #5;
      checks++;
      if (r !== top_first) begin failures++; $display("FAIL falling edge changed r"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
