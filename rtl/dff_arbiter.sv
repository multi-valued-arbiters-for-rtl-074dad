// dff_arbiter: the classical arbiter of an arbiter PUF.
//
// A single flip-flop takes the upper path on D and the lower path on its
// clock. When a rising edge races down both paths, the flip-flop samples the
// upper path at the moment the lower edge arrives: r = 1 if the upper path was
// faster, r = 0 if the lower one was. If the edges arrive within the
// flip-flop's setup/hold window the result is metastable and unreliable, which
// is the weakness the multi-valued arbiters address.
//
// Interface: init clears r asynchronously (the Init signal of the control);
// path_top/path_bot are the two chain outputs. There is no system clock; r is
// valid once both edges have arrived and must be sampled by the system clock
// only after that.
module dff_arbiter (
  input  logic init,
  input  logic path_top,
  input  logic path_bot,
  output logic r
);
  always_ff @(posedge path_bot or posedge init) begin
    if (init) r <= 1'b0;
    else      r <= path_top;
  end
endmodule
