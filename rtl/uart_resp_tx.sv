// uart_resp_tx: serial transmitter for the response words.
//
// On send (accepted only when idle) it latches data and sends its NBYTES bytes,
// byte 0 = data[7:0] first, each as an 8N1 frame: one start bit (0), eight
// data bits least significant first, one stop bit (1). Every bit lasts
// BAUD_DIV clock cycles (868 = 115200 baud from a 100 MHz clock). txd idles
// high. busy is high from the cycle after send until the last stop bit has
// ended; a word takes NBYTES * 10 * BAUD_DIV cycles.
//
// That responses leave over a UART follows the published design; frame format, baud rate
// and byte order are this design's choice.
module uart_resp_tx #(
  parameter int unsigned NBYTES   = 2,
  parameter int unsigned BAUD_DIV = 868
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              send,
  input  logic [8*NBYTES-1:0] data,
  output logic              txd,
  output logic              busy
);
  localparam int unsigned DW = (BAUD_DIV > 1) ? $clog2(BAUD_DIV) : 1;
  localparam int unsigned BW = (NBYTES > 1) ? $clog2(NBYTES) : 1;

  logic [8*NBYTES-1:0] buf_q;
  logic [DW-1:0]       div;
  logic [3:0]          bitn;   // 0 start, 1..8 data, 9 stop
  logic [BW-1:0]       byten;
  logic [7:0]          cur;

  assign cur = buf_q[byten*8 +: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      div   <= '0;
      bitn  <= '0;
      byten <= '0;
      busy  <= 1'b0;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (send) begin
        buf_q <= data;
        busy  <= 1'b1;
        byten <= '0;
        bitn  <= '0;
        div   <= DW'(BAUD_DIV - 1);
        txd   <= 1'b0;            // start bit of byte 0
      end
    end else if (div != '0) begin
      div <= div - 1'b1;
    end else begin
      div <= DW'(BAUD_DIV - 1);
      if (bitn == 4'd9) begin
        if (byten == BW'(NBYTES - 1)) begin
          busy <= 1'b0;
          txd  <= 1'b1;
        end else begin
          byten <= byten + 1'b1;
          bitn  <= '0;
          txd   <= 1'b0;          // start bit of the next byte
        end
      end else begin
        bitn <= bitn + 1'b1;
        txd  <= (bitn == 4'd8) ? 1'b1 : cur[bitn[2:0]];
      end
    end
  end

  a_idle_high: assert property (@(posedge clk) disable iff (!rst_n) !busy |-> txd)
    else $error("txd low while the transmitter is idle");
endmodule
