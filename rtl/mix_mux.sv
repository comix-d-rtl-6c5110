// mix_mux -- the two mixing multiplexers of CoMix-D.
//
// Per bit, forwards either the LiteSync output pair (sel = 0, SCC ~ +1) or
// the LiteDesync output pair (sel = 1, SCC ~ -1). With sel = 1 for a
// fraction p of the bits, the number of '11' pairs of the result is
// p*a_min + (1-p)*a_max = x*y/n, i.e. the pair is uncorrelated.
// Both pairs are selected by the same signal so the two output streams are
// taken from the same source in every cycle.
//
// Purely combinational.
module mix_mux (
  input  logic sel,
  input  logic xs,
  input  logic ys,
  input  logic xd,
  input  logic yd,
  output logic x_out,
  output logic y_out
);
  always_comb begin
    x_out = sel ? xd : xs;
    y_out = sel ? yd : ys;
  end
endmodule
