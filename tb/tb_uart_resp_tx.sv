// tb_uart_resp_tx: the serial transmitter with 3-byte words and 8 cycles per
// bit. A receiver model in the testbench finds each start bit, samples every
// bit in its middle and checks start, data and stop bits against the word
// that was sent, byte 0 first. busy must last exactly 3 * 10 * 8 cycles, and a
// send while busy must be ignored.
module tb_uart_resp_tx;
  localparam int unsigned NB = 3, BD = 8;
  logic clk = 0, rst_n, send, txd, busy;
  logic [8*NB-1:0] data;
  int checks = 0, failures = 0;

  uart_resp_tx #(.NBYTES(NB), .BAUD_DIV(BD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver
  logic [8*NB-1:0] rx_word;
  int rx_bytes = 0;
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      repeat (BD / 2) @(posedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (BD) @(posedge clk);
        b[i] = txd;
      end
      repeat (BD) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      rx_word[8*(rx_bytes % NB) +: 8] = b;
      rx_bytes++;
    end
  end

  initial begin
    int n;
    rst_n = 1; #1 rst_n = 0; send = 0; data = '0;
    #12 rst_n = 1;
    checks++;
    if (txd !== 1'b1 || busy !== 1'b0) begin failures++; $display("FAIL idle"); end
    for (int w = 0; w < 6; w++) begin
      logic [8*NB-1:0] sent;
      @(negedge clk);
      sent = (8*NB)'({$urandom, $urandom});
      data = sent; send = 1;
      @(negedge clk);
      send = 0;
      n = 0;
      while (busy) begin
        if (n == 40) begin data = ~sent; send = 1; end   // ignored
        else send = 0;
        n++; @(negedge clk);
      end
      send = 0;
      repeat (BD) @(negedge clk);
      checks++;
      if (n != int'(NB * 10 * BD)) begin failures++; $display("FAIL busy %0d cycles", n); end
      checks++;
      if (rx_bytes != int'(NB) * (w + 1) || rx_word !== sent) begin
        failures++;
        $display("FAIL word %0d: got %h sent %h bytes %0d", w, rx_word, sent, rx_bytes);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
