// tpg: test pulse generator, the source of the PUF start signal S.
//
// On fire (accepted only when idle) the generator drives s high for
// PULSE_CYCLES clock cycles, then low, then waits GAP_CYCLES more cycles for
// the falling edge to cross the chains and the arbiters to settle, and then
// raises done for one cycle. The rising edge of s starts the race seen by the
// classical and 4-DFF arbiters; the falling edge is the second race of the
// 4-DFF arbiter and the race of the SR-latch arbiters, whose inputs idle high
// while s is high.
//
// A pulse generator driving S follows the published design; the pulse and gap lengths
// are this design's choice (the published design gives no timing).
//
// mid pulses for one cycle about halfway through the high phase of s (after
// PULSE_CYCLES/2 cycles high); the control uses it to release the clear of the
// SR-latch arbiters, which must stay cleared while the rising edge crosses
// their chains.
//
// Interface: clk, rst_n (asynchronous, active low), fire in, s, mid and done
// out.
// s is a register output, so it is free of glitches. A measurement takes
// PULSE_CYCLES + GAP_CYCLES + 1 cycles from fire to done.
module tpg #(
  parameter int unsigned PULSE_CYCLES = 32,
  parameter int unsigned GAP_CYCLES   = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fire,
  output logic s,
  output logic mid,
  output logic done
);
  typedef enum logic [1:0] {IDLE, HIGH, LOW} state_e;

  localparam int unsigned CW = $clog2(((PULSE_CYCLES > GAP_CYCLES) ? PULSE_CYCLES : GAP_CYCLES) + 1);

  if (PULSE_CYCLES < 2 || GAP_CYCLES < 1) begin : g_bad_len
    $error("tpg: PULSE_CYCLES must be at least 2 and GAP_CYCLES at least 1");
  end

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cnt   <= '0;
      s     <= 1'b0;
      mid   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      mid  <= (state == HIGH) && (cnt == CW'(PULSE_CYCLES / 2));
      case (state)
        IDLE: if (fire) begin
          state <= HIGH;
          s     <= 1'b1;
          cnt   <= CW'(PULSE_CYCLES - 1);
        end
        HIGH: if (cnt == '0) begin
          state <= LOW;
          s     <= 1'b0;
          cnt   <= CW'(GAP_CYCLES - 1);
        end else begin
          cnt <= cnt - 1'b1;
        end
        default: if (cnt == '0) begin
          state <= IDLE;
          done  <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      endcase
    end
  end
endmodule
