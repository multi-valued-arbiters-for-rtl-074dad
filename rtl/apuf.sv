// apuf: the classical arbiter PUF, kept in the system as the reference design.
//
// A start edge enters both ends of a chain of N switch stages
// (puf_switch_stage); each challenge bit ch[n] lets the two paths run straight
// or crossed through stage n (ch[0] drives the first stage L_1). A single
// flip-flop arbiter (dff_arbiter) after the last stage decides which path was
// faster and gives one response bit per challenge.
//
// Interface: s_top/s_bot are the two chain inputs (tied to the same start
// signal S in the system); ch must be stable before the rising start edge; init
// clears the arbiter. r is valid after the edge has crossed the chain. The
// chain length N = 128 follows the published design.
module apuf #(
  parameter int unsigned N = 128
) (
  input  logic         init,
  input  logic         s_top,
  input  logic         s_bot,
  input  logic [N-1:0] ch,
  output logic         r
);
  logic [N:0] p_top, p_bot;  // p_*[n] enters stage n, p_*[N] leaves the chain

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
  end

  dff_arbiter u_arb (
    .init    (init),
    .path_top(p_top[N]),
    .path_bot(p_bot[N]),
    .r       (r)
  );
endmodule
