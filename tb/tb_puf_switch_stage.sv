// tb_puf_switch_stage: exhaustive check of one delay-chain stage.
// All eight input combinations are applied; with ch = 0 the outputs must
// equal the inputs, with ch = 1 they must be swapped.
module tb_puf_switch_stage;
  logic in_top, in_bot, ch, out_top, out_bot;
  int checks = 0, failures = 0;

  puf_switch_stage dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ch, in_bot, in_top} = 3'(v);
      #1;
      checks++;
      if (ch == 1'b0) begin
        if (out_top !== in_top || out_bot !== in_bot) begin
          failures++;
          $display("FAIL straight v=%0d out=%b%b", v, out_top, out_bot);
        end
      end else begin
        if (out_top !== in_bot || out_bot !== in_top) begin
          failures++;
          $display("FAIL crossed v=%0d out=%b%b", v, out_top, out_bot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
