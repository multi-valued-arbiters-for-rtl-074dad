// mapuf_system: arbiter-PUF test system with multi-valued arbiters.
//
// A single start signal S from the control races through several arbiter-PUF
// delay chains that all see the same N-bit challenge from the control's LFSR:
//   - one classical arbiter PUF (apuf), one bit per challenge;
//   - D multi-arbiter PUFs (mapuf) of each arbiter circuit: single flip-flop,
//     4-DFF, SR latch, SR latch with counter. Each has an arbiter after every
//     stage; the common address adr picks which one is reported.
// After each measurement the response register (response_reg) captures
//   resp[0]                     classical A-PUF bit
//   resp[1       +: D]          single-DFF MA-PUFs, instance d at bit 1+d
//   resp[1+D     +: 4*D]        4-DFF MA-PUFs, R^0..R^3 of instance d at 4*d
//   resp[1+5*D   +: 2*D]        SR-latch MA-PUFs, R^0,R^1 of instance d at 2*d
//   resp[1+7*D   +: 8*D]        SR-counter MA-PUFs, count of instance d at 8*d
// padded with zeros to whole bytes, and the serial transmitter (uart_resp_tx)
// sends the word, byte 0 first. The control then moves to the next challenge.
//
// Interface: clk, rst_n (asynchronous, active low); start begins an
// experiment of NUM_CHALLENGES measurements; adr must stay stable during it;
// busy is high while it runs and done pulses at its end; index counts the
// measurements finished so far. resp/resp_valid show
// each captured word; uart_txd is the serial output. A measurement takes
// INIT_CYCLES + PULSE_CYCLES + GAP_CYCLES + 5 cycles plus
// NBYTES * 10 * BAUD_DIV cycles of transmission.
//
// The composition of control (TPG, LFSR), PUF instances, arbiter multiplexers,
// REG and UART follows the published design, as do N = 128 and the 10,000 challenges of
// an experiment. D = 1, the packing of the word, the serial format and all
// cycle counts are this design's choice, and so is clearing the SR-latch
// MA-PUFs with a separate init_fall that stays high across the rising edge of
// S (see puf_control). The SR-latch arbiters contain
// intentional combinational loops (see nor_sr_latch), and the chain outputs
// clock the arbiter flip-flops: both are the nature of the circuit.
module mapuf_system
  import puf_pkg::*;
#(
  parameter int unsigned N              = 128,
  parameter int unsigned D              = 1,
  parameter int unsigned NUM_CHALLENGES = 10000,
  parameter int unsigned INIT_CYCLES    = 4,
  parameter int unsigned PULSE_CYCLES   = 32,
  parameter int unsigned GAP_CYCLES     = 32,
  parameter int unsigned BAUD_DIV       = 868,
  parameter logic [N-1:0] SEED          = N'(128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834),
  parameter int unsigned AW             = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned RESP_W         = 1 + D * (1 + 4 + 2 + SR_CNT_W),
  parameter int unsigned NBYTES         = (RESP_W + 7) / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW-1:0]     adr,
  output logic              busy,
  output logic              done,
  output logic [31:0]       index,
  output logic [RESP_W-1:0] resp,
  output logic              resp_valid,
  output logic              uart_txd
);
  logic         s;
  logic         init;
  logic         init_fall;
  logic         capture;
  logic         send;
  logic         tx_busy;
  logic [N-1:0] challenge;

  puf_control #(
    .N             (N),
    .NUM_CHALLENGES(NUM_CHALLENGES),
    .INIT_CYCLES   (INIT_CYCLES),
    .PULSE_CYCLES  (PULSE_CYCLES),
    .GAP_CYCLES    (GAP_CYCLES),
    .SEED          (SEED)
  ) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .tx_busy  (tx_busy),
    .challenge(challenge),
    .s        (s),
    .init     (init),
    .init_fall(init_fall),
    .capture  (capture),
    .send     (send),
    .busy     (busy),
    .done     (done),
    .index    (index)
  );

  // ---- PUF instances ----
  logic              r_apuf;
  logic [D-1:0]      r_dff;
  logic [4*D-1:0]    r_4dff;
  logic [2*D-1:0]    r_sr;
  logic [8*D-1:0]    r_cnt;

  apuf #(.N(N)) u_apuf (
    .init (init),
    .s_top(s),
    .s_bot(s),
    .ch   (challenge),
    .r    (r_apuf)
  );

  for (genvar d = 0; d < D; d++) begin : g_ma
    logic [N-1:0]          all_dff;
    logic [4*N-1:0]        all_4dff;
    logic [2*N-1:0]        all_sr;
    logic [SR_CNT_W*N-1:0] all_cnt;

    mapuf #(.N(N), .ARB(ARB_DFF)) u_dff (
      .init(init), .s_top(s), .s_bot(s), .ch(challenge), .adr(adr),
      .r(r_dff[d]), .arb_all(all_dff)
    );
    mapuf #(.N(N), .ARB(ARB_4DFF)) u_4dff (
      .init(init), .s_top(s), .s_bot(s), .ch(challenge), .adr(adr),
      .r(r_4dff[4*d +: 4]), .arb_all(all_4dff)
    );
    mapuf #(.N(N), .ARB(ARB_SR)) u_sr (
      .init(init_fall), .s_top(s), .s_bot(s), .ch(challenge), .adr(adr),
      .r(r_sr[2*d +: 2]), .arb_all(all_sr)
    );
    mapuf #(.N(N), .ARB(ARB_SR_CNT)) u_cnt (
      .init(init_fall), .s_top(s), .s_bot(s), .ch(challenge), .adr(adr),
      .r(r_cnt[SR_CNT_W*d +: SR_CNT_W]), .arb_all(all_cnt)
    );
  end

  // ---- REG and serial link ----
  logic [8*NBYTES-1:0] word;

  response_reg #(.W(RESP_W)) u_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .load (capture),
    .d    ({r_cnt, r_sr, r_4dff, r_dff, r_apuf}),
    .q    (resp),
    .valid(resp_valid)
  );

  assign word = (8*NBYTES)'(resp);

  uart_resp_tx #(.NBYTES(NBYTES), .BAUD_DIV(BAUD_DIV)) u_uart (
    .clk  (clk),
    .rst_n(rst_n),
    .send (send),
    .data (word),
    .txd  (uart_txd),
    .busy (tx_busy)
  );
endmodule
