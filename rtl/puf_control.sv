// puf_control: the control block of the PUF test system.
//
// Runs an experiment of NUM_CHALLENGES measurements after a start request.
// One measurement:
//   INIT     init high for INIT_CYCLES cycles: all arbiters cleared while the
//            challenge (already on the challenge output) settles in the chains
//   FIRE     the test pulse generator (tpg) is fired
//   PULSE    S rises, stays high, falls; the tpg then waits for the arbiters
//            to settle and reports done
//   CAPTURE  capture is high for one cycle: the response register loads
//   SEND     send is high for one cycle: the serial link takes the word
//   WAIT_TX  wait until the link is idle again, then step the LFSR to the next
//            challenge and start the next measurement, or stop after the last
// init_fall clears the arbiters that race on the falling edge of S (the
// SR-latch arbiters). It rises with init but stays high until the middle of
// the S pulse: while S rises, one input of such a latch can be high while the
// other is still low, which makes the latch output rise once; holding the
// clear across that edge keeps it from being recorded. The arbiters racing on
// the rising edge use init, which falls before S rises.
//
// The challenge comes from an N-bit LFSR (lfsr), whose first value after reset
// is SEED. done pulses for one cycle when the experiment ends; busy is high
// while it runs; index counts the measurements done so far. init is a
// register output (it clears the arbiters asynchronously, so it must not
// glitch) and is high exactly in the INIT cycles. Assertions at the end check
// the rules the arbiters rely on: S never high during init, init_fall high
// while S rises and low when it falls.
//
// The Control block holding a TPG and an LFSR, and the Init signal clearing
// the arbiters, follow the published design. The state sequence and the cycle counts are
// this design's choice, as is the second clear signal init_fall. A
// measurement takes INIT_CYCLES + 1 + (PULSE_CYCLES + GAP_CYCLES + 1) + 3
// cycles plus the serial link's time.
module puf_control #(
  parameter int unsigned  N              = 128,
  parameter int unsigned  NUM_CHALLENGES = 10000,
  parameter int unsigned  INIT_CYCLES    = 4,
  parameter int unsigned  PULSE_CYCLES   = 32,
  parameter int unsigned  GAP_CYCLES     = 32,
  parameter logic [N-1:0] SEED           = N'(128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         tx_busy,
  output logic [N-1:0] challenge,
  output logic         s,
  output logic         init,
  output logic         init_fall,
  output logic         capture,
  output logic         send,
  output logic         busy,
  output logic         done,
  output logic [31:0]  index
);
  typedef enum logic [2:0] {IDLE, INIT, FIRE, PULSE, CAPTURE, SEND, WAIT_TX} state_e;

  localparam int unsigned IW = $clog2(INIT_CYCLES + 1);

  state_e        state;
  logic [IW-1:0] icnt;
  logic          step;
  logic          fire;
  logic          tpg_done;
  logic          tpg_mid;

  lfsr #(.N(N), .SEED(SEED)) u_lfsr (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .q    (challenge)
  );

  tpg #(.PULSE_CYCLES(PULSE_CYCLES), .GAP_CYCLES(GAP_CYCLES)) u_tpg (
    .clk  (clk),
    .rst_n(rst_n),
    .fire (fire),
    .s    (s),
    .mid  (tpg_mid),
    .done (tpg_done)
  );

  assign fire    = (state == FIRE);
  assign capture = (state == CAPTURE);
  assign send    = (state == SEND);
  assign busy    = (state != IDLE);
  assign step    = (state == WAIT_TX) && !tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      icnt  <= '0;
      index <= '0;
      done  <= 1'b0;
      init  <= 1'b0;
      init_fall <= 1'b0;
    end else begin
      if (tpg_mid) init_fall <= 1'b0;
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= INIT;
          init  <= 1'b1;
          init_fall <= 1'b1;
          icnt  <= IW'(INIT_CYCLES - 1);
          index <= '0;
        end
        INIT: if (icnt == '0) begin
          state <= FIRE;
          init  <= 1'b0;
        end else begin
          icnt <= icnt - 1'b1;
        end
        FIRE:    state <= PULSE;
        PULSE:   if (tpg_done) state <= CAPTURE;
        CAPTURE: state <= SEND;
        SEND:    state <= WAIT_TX;
        default: if (!tx_busy) begin   // WAIT_TX
          index <= index + 1;
          if (index == NUM_CHALLENGES - 1) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= INIT;
            init  <= 1'b1;
            init_fall <= 1'b1;
            icnt  <= IW'(INIT_CYCLES - 1);
          end
        end
      endcase
    end
  end

  // Sequencing rules the arbiters depend on.
  a_no_s_during_init: assert property (@(posedge clk) disable iff (!rst_n) !(init && s))
    else $error("S high while init clears the rising-edge arbiters");
  a_fall_clear_at_rise: assert property (@(posedge clk) disable iff (!rst_n) $rose(s) |-> init_fall)
    else $error("SR-latch arbiters not cleared while S rises");
  a_fall_free_at_fall: assert property (@(posedge clk) disable iff (!rst_n) $fell(s) |-> !init_fall)
    else $error("SR-latch arbiters still cleared when S falls");
endmodule
