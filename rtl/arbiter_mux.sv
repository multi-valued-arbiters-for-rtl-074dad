// arbiter_mux: selects the output of one arbiter of a multi-arbiter PUF.
//
// arb holds the W-bit outputs of N arbiters, arbiter k (k = 0 after the first
// stage, N-1 after the last) at arb[k*W +: W]. adr picks one of them. An
// address at or beyond N selects nothing and gives zero. Purely combinational.
// The multiplexer and its Adr input follow the published design; the packing of the
// arbiter outputs and the out-of-range rule are this design's choice.
module arbiter_mux #(
  parameter int unsigned N  = 128,
  parameter int unsigned W  = 1,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N*W-1:0] arb,
  input  logic [AW-1:0]  adr,
  output logic [W-1:0]   r
);
  always_comb begin
    r = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (adr == AW'(k)) r = arb[k*W +: W];
    end
  end
endmodule
