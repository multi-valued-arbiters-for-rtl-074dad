// sr_counter_arbiter: SR-latch arbiter with an oscillation counter.
//
// The same latch as sr_latch_arbiter, but its upper output q_top clocks a
// CNT_W-bit counter instead of two flip-flops. After a race the counter holds
// the number of rising edges of q_top: 0 (s2 fell first), 1 (s1 fell first) or
// a larger number when the latch oscillated. The count is a rough measure of
// the length and frequency of the damped oscillation, which repeats for a
// given challenge. The 8-bit width follows the published design; the counter wraps
// around past its maximum (wrapping versus saturating is not specified, and
// wrapping is this design's choice).
//
// Interface: init clears the counter asynchronously; r is the count. No system
// clock; r is valid once the latch output has settled.
module sr_counter_arbiter #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             init,
  input  logic             s1,   // upper path
  input  logic             s2,   // lower path
  output logic [CNT_W-1:0] r
);
  logic q_top, q_bot;

  nor_sr_latch u_latch (
    .s1   (s1),
    .s2   (s2),
    .q_top(q_top),
    .q_bot(q_bot)
  );

  always_ff @(posedge q_top or posedge init) begin
    if (init) r <= '0;
    else      r <= r + 1'b1;
  end
endmodule
