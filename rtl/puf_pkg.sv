// puf_pkg: types and constants shared by the multi-arbiter PUF.
//
// arb_kind_e names the four arbiter circuits an MA-PUF can be built with, and
// arb_width() gives the number of response bits each one produces per
// arbiter. trit_e is the three-valued response alphabet {0, 1, X}: X marks an
// arbiter that went metastable (4-DFF arbiter) or oscillated (SR-latch
// arbiter). The decode functions map the raw flip-flop bits of those arbiters
// to that alphabet, following the code tables of the published design; trit_distance2()
// is twice the per-position distance of the ternary Hamming/Sokal-Michener
// metric (0 and 1 differ by 1, X differs from either by 0.5), kept as an
// integer so that sums stay exact.
package puf_pkg;

  typedef enum logic [1:0] {
    ARB_DFF     = 2'd0,  // classical arbiter, one flip-flop
    ARB_4DFF    = 2'd1,  // four flip-flops, both edges of both paths
    ARB_SR      = 2'd2,  // SR latch followed by two flip-flops
    ARB_SR_CNT  = 2'd3   // SR latch followed by an oscillation counter
  } arb_kind_e;

  localparam int unsigned SR_CNT_W = 8;  // counter width of ARB_SR_CNT

  function automatic int unsigned arb_width(arb_kind_e k);
    case (k)
      ARB_DFF:    return 1;
      ARB_4DFF:   return 4;
      ARB_SR:     return 2;
      default:    return SR_CNT_W;
    endcase
  endfunction

  typedef enum logic [1:0] {
    TRIT_0 = 2'd0,
    TRIT_1 = 2'd1,
    TRIT_X = 2'd2
  } trit_e;

  // 4-DFF arbiter: r[0] = R^0 ... r[3] = R^3. Only the two codes produced by a
  // clean race are stable; every other code is a metastable response.
  //   R^0 R^1 R^2 R^3 = 1 0 0 1 : upper path first -> response 1
  //   R^0 R^1 R^2 R^3 = 0 1 1 0 : lower path first -> response 0
  function automatic trit_e decode_4dff(logic [3:0] r);
    if (r == 4'b1001) return TRIT_1;       // r[3]=1 r[2]=0 r[1]=0 r[0]=1
    else if (r == 4'b0110) return TRIT_0;  // r[3]=0 r[2]=1 r[1]=1 r[0]=0
    else return TRIT_X;
  endfunction

  // SR-latch arbiter: r[0] = R^0, r[1] = R^1.
  //   R^0=0 R^1=0 : stable one
  //   R^0=1 R^1=0 : stable zero
  //   R^0=1 R^1=1 : high-frequency oscillation (X)
  // R^0=0 R^1=1 cannot occur (R^1 loads R^0); it is treated as X.
  function automatic trit_e decode_sr(logic [1:0] r);
    case (r)
      2'b00:   return TRIT_1;
      2'b01:   return TRIT_0;
      default: return TRIT_X;
    endcase
  endfunction

  function automatic int unsigned trit_distance2(trit_e a, trit_e b);
    if (a == b) return 0;
    else if (a == TRIT_X || b == TRIT_X) return 1;
    else return 2;
  endfunction

endpackage
