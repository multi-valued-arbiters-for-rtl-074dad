// mapuf: multi-arbiter PUF (MA-PUF).
//
// Like the classical arbiter PUF, a start edge races down two paths through N
// switch stages steered by the challenge. Unlike it, there is an arbiter after
// every stage, not only after the last: arbiter k (k = 0..N-1) compares the
// two paths leaving stage k+1, so one challenge yields N responses, each from
// a chain of a different length. A multiplexer (arbiter_mux) driven by adr
// picks which arbiter's output is reported. The arbiter circuit is chosen by
// ARB:
//   ARB_DFF     one flip-flop, 1 bit            (dff_arbiter)
//   ARB_4DFF    four flip-flops, 4 bits, X-flag (four_dff_arbiter)
//   ARB_SR      SR latch + 2 flip-flops, 2 bits (sr_latch_arbiter)
//   ARB_SR_CNT  SR latch + counter, 8 bits      (sr_counter_arbiter)
// W = puf_pkg::arb_width(ARB) is the width of r.
//
// Interface: s_top/s_bot are the two chain inputs (both driven by the start
// signal S in the system), ch[n] steers stage n+1, init clears all arbiters,
// adr selects an arbiter. arb_all gives every arbiter's output, arbiter k at
// arb_all[k*W +: W]. No system clock: outputs are valid once the start pulse
// (a rising and a falling edge) has crossed the chain.
//
// Follows the published design: per-stage arbiters, the Adr-driven multiplexer, the
// four arbiter circuits and N = 128. Bringing all arbiter outputs out as well
// is this design's addition for observation and testing.
module mapuf
  import puf_pkg::*;
#(
  parameter int unsigned N   = 128,
  parameter arb_kind_e   ARB = ARB_DFF,
  parameter int unsigned W   = arb_width(ARB),
  parameter int unsigned AW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic           init,
  input  logic           s_top,
  input  logic           s_bot,
  input  logic [N-1:0]   ch,
  input  logic [AW-1:0]  adr,
  output logic [W-1:0]   r,
  output logic [N*W-1:0] arb_all
);
  logic [N:0] p_top, p_bot;

  assign p_top[0] = s_top;
  assign p_bot[0] = s_bot;

  for (genvar n = 0; n < N; n++) begin : g_stage
    puf_switch_stage u_stage (
      .in_top (p_top[n]),
      .in_bot (p_bot[n]),
      .ch     (ch[n]),
      .out_top(p_top[n+1]),
      .out_bot(p_bot[n+1])
    );

    if (ARB == ARB_DFF) begin : g_arb
      dff_arbiter u_arb (
        .init    (init),
        .path_top(p_top[n+1]),
        .path_bot(p_bot[n+1]),
        .r       (arb_all[n*W +: W])
      );
    end else if (ARB == ARB_4DFF) begin : g_arb
      four_dff_arbiter u_arb (
        .init(init),
        .s1  (p_top[n+1]),
        .s2  (p_bot[n+1]),
        .r   (arb_all[n*W +: W])
      );
    end else if (ARB == ARB_SR) begin : g_arb
      sr_latch_arbiter u_arb (
        .init(init),
        .s1  (p_top[n+1]),
        .s2  (p_bot[n+1]),
        .r   (arb_all[n*W +: W])
      );
    end else begin : g_arb
      sr_counter_arbiter #(.CNT_W(W)) u_arb (
        .init(init),
        .s1  (p_top[n+1]),
        .s2  (p_bot[n+1]),
        .r   (arb_all[n*W +: W])
      );
    end
  end

  arbiter_mux #(.N(N), .W(W), .AW(AW)) u_mux (
    .arb(arb_all),
    .adr(adr),
    .r  (r)
  );
endmodule
