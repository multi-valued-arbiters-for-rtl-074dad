// sr_latch_arbiter: SR-latch arbiter that detects oscillation (metastability).
//
// The two chain outputs, idle high, both fall during the race and drive a
// cross-coupled latch (nor_sr_latch). The upper latch output q_top clocks two
// flip-flops: the first loads a constant 1, the second loads the first. So
//   R^0 = 1 once q_top has risen at least once,
//   R^1 = 1 once q_top has risen at least twice.
// Reading the pair:
//   R^0 R^1 = 0 0 : s2 fell first, q_top never rose    -> stable one
//   R^0 R^1 = 1 0 : s1 fell first, q_top rose once     -> stable zero
//   R^0 R^1 = 1 1 : q_top rose repeatedly (oscillation) -> X
// (see puf_pkg::decode_sr). The meaning of the three codes follows the published design.
// That the second flip-flop loads R^0 on the same clock is this design's
// reading of how "more than one rising edge" is detected.
//
// Interface: init clears both flip-flops asynchronously; it must be released
// before the inputs fall. No system clock; r is valid once the latch output
// has settled. The latch holds a combinational loop by intent (see
// nor_sr_latch).
module sr_latch_arbiter (
  input  logic       init,
  input  logic       s1,   // upper path
  input  logic       s2,   // lower path
  output logic [1:0] r     // r[0] = R^0, r[1] = R^1
);
  logic q_top, q_bot;

  nor_sr_latch u_latch (
    .s1   (s1),
    .s2   (s2),
    .q_top(q_top),
    .q_bot(q_bot)
  );

  always_ff @(posedge q_top or posedge init) begin
    if (init) r <= 2'b00;
    else      r <= {r[0], 1'b1};
  end
endmodule
