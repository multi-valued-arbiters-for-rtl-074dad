// four_dff_arbiter: a 4-flip-flop arbiter that flags metastable responses.
//
// The race is started by a pulse, so each path carries a rising and then a
// falling edge. Four flip-flops sample each path on both edges of the other:
//   r[0] = R^0 : s1 sampled on the rising  edge of s2
//   r[1] = R^1 : s2 sampled on the rising  edge of s1
//   r[2] = R^2 : s1 sampled on the falling edge of s2
//   r[3] = R^3 : s2 sampled on the falling edge of s1
// A clean race in which s1 leads on both edges gives R^0..R^3 = 1,0,0,1; a
// clean race in which s2 leads gives 0,1,1,0. Any other code means that at
// least one flip-flop saw its two inputs too close together, and the response
// bit is reported as X (see puf_pkg::decode_4dff).
//
// The sampling relations are those that reproduce the two example waveforms
// given for this arbiter (s1 first: 1,0,0,1; s2 first: 0,1,1,0), with the
// falling-edge clocks drawn as inverted clock inputs. Which of the two stable
// codes is called 1 is this design's choice (s1 first = 1, matching the
// classical arbiter, whose D input is the upper path).
//
// Interface: init clears all four flip-flops asynchronously. No system clock;
// r is valid after both falling edges have arrived.
module four_dff_arbiter (
  input  logic       init,
  input  logic       s1,   // upper path
  input  logic       s2,   // lower path
  output logic [3:0] r
);
  logic r0, r1, r2, r3;

  assign r = {r3, r2, r1, r0};

  always_ff @(posedge s2 or posedge init) begin
    if (init) r0 <= 1'b0;
    else      r0 <= s1;
  end

  always_ff @(posedge s1 or posedge init) begin
    if (init) r1 <= 1'b0;
    else      r1 <= s2;
  end

  always_ff @(negedge s2 or posedge init) begin
    if (init) r2 <= 1'b0;
    else      r2 <= s1;
  end

  always_ff @(negedge s1 or posedge init) begin
    if (init) r3 <= 1'b0;
    else      r3 <= s2;
  end
endmodule
