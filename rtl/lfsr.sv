// lfsr: challenge generator of the PUF control.
//
// An N-bit Fibonacci linear-feedback shift register. On each step the register
// shifts towards the high end and the XOR of the tap bits enters at bit 0.
// The taps are the usual maximal-length ones (x^128 + x^126 + x^101 + x^99 + 1
// for N = 128); taps are also listed for the other chain lengths the published
// design studies (2..8, 16, 32, 64). For any other N the taps fall back to
// x^N + x^(N-1) + 1, which is not maximal in general. The all-zero state is a
// lock-up state, so SEED must be non-zero. The default seed is the low N
// bits of a fixed dense constant, so that the first challenges already mix
// ones and zeros.
//
// That the challenge comes from an LFSR follows the published design; its polynomial,
// seed, and the single step per challenge are this design's choice.
//
// Interface: q is the current challenge, q[0] feeding stage L_1. step advances
// the register on the next rising clk edge. rst_n (active low, asynchronous)
// loads SEED.
module lfsr #(
  parameter int unsigned N    = 128,
  parameter logic [N-1:0] SEED = N'(128'h9E37_79B9_7F4A_7C15_F39C_C060_5CED_C834)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [N-1:0] q
);
  // Tap positions of the polynomial (0 = unused slot).
  typedef int unsigned taps_t[4];

  function automatic taps_t tap_list();
    case (N)
      2:       return '{2, 1, 0, 0};
      3:       return '{3, 2, 0, 0};
      4:       return '{4, 3, 0, 0};
      5:       return '{5, 3, 0, 0};
      6:       return '{6, 5, 0, 0};
      7:       return '{7, 6, 0, 0};
      8:       return '{8, 6, 5, 4};
      16:      return '{16, 15, 13, 4};
      32:      return '{32, 22, 2, 1};
      64:      return '{64, 63, 61, 60};
      128:     return '{128, 126, 101, 99};
      default: return '{N, N - 1, 0, 0};
    endcase
  endfunction

  // Tap mask: bit t-1 set for tap t.
  function automatic logic [N-1:0] tap_mask();
    taps_t t;
    logic [N-1:0] m;
    t = tap_list();
    m = '0;
    for (int i = 0; i < 4; i++) begin
      if (t[i] != 0) m[t[i]-1] = 1'b1;
    end
    return m;
  endfunction

  localparam logic [N-1:0] TAPS = tap_mask();

  if (N < 2) begin : g_bad_n
    $error("lfsr: N must be at least 2");
  end

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (step) q <= {q[N-2:0], fb};
  end
endmodule
