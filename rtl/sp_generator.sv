// sp_generator -- raw mixing-select stream of CoMix-D.
//
// Produces a stream S_p whose fraction of 1s equals the mixing ratio p, the
// share of output bits to take from LiteDesync so that the mixed pair has
// SCC = 0. It uses only the already-manipulated streams:
//   AND (LiteSync X', Y')    -> 1s count min(x, y)            (SCC ~ +1 pair)
//   XNOR(LiteDesync X', Y')  -> 1s count |x + y - n|          (SCC ~ -1 pair)
//   S_p = AND | XNOR         -> min(x,y)/n if x + y >= n, 1 - max(x,y)/n else
// which is the solution p of  p*a_min + (1-p)*a_max = x*y/n  for the four
// input cases. The exact count holds when the FSMs reach full correlation;
// otherwise it is close.
//
// Purely combinational, no clock.
module sp_generator (
  input  logic xs,   // LiteSync X'
  input  logic ys,   // LiteSync Y'
  input  logic xd,   // LiteDesync X'
  input  logic yd,   // LiteDesync Y'
  output logic sp
);
  logic min_term;    // probability min(x/n, y/n)
  logic lin_term;    // probability x/n + y/n - 1  or  1 - x/n - y/n

  always_comb begin
    min_term = xs & ys;
    lin_term = ~(xd ^ yd);
    sp       = min_term | lin_term;
  end
endmodule
