// comix_d -- CoMix-D: RNG-free, real-time stochastic-computing decorrelator.
//
// Takes two stochastic numbers (bit streams x/n, y/n) that may be strongly
// correlated and returns streams with the same values and SCC ~ 0, without a
// random number generator. Both inputs feed a LiteSync (makes the pair
// SCC ~ +1) and a LiteDesync (SCC ~ -1) in parallel. An uncorrelated pair has
// x*y/n '11' pairs, which lies between the counts of the two versions, so a
// MUX mixes them: it takes the LiteDesync pair for a fraction p of the bits.
// The select stream with P(1) = p is made from the FSM outputs by
// sp_generator (AND | XNOR); because it is derived from the same data it is
// first passed through bit_aggregator, which gathers its 1s into long runs
// and so removes its bit-level correlation with the MUX data inputs.
//
// Interface: one input bit pair per rising clk edge; x_out/y_out belong to
// the pair on x_in/y_in in the same cycle (zero-cycle latency, one pair per
// cycle). rst_n is asynchronous, active low; a new stream pair is normally
// started after a reset. Parameters: D = FSM depth (1 = the two-state FSMs),
// L = BitAggregator counter width (toggle every 2^L deferred bits).
// Structure and defaults D = 1, L = 4 follow the published design; reset
// values and the D > 1 FSM form are this design's choices.
// Both FSMs leave X unchanged, so x_out always equals x_in and synthesis
// removes the X multiplexer; it is kept so that the two outputs are built
// symmetrically and a variant that also edits X drops in unchanged.
module comix_d #(
  parameter int unsigned D           = 1,
  parameter int unsigned L           = 4,
  parameter int unsigned SYNC_INIT   = 0,
  parameter int unsigned DESYNC_INIT = 0,
  parameter bit          FLAG_INIT   = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_in,
  input  logic y_in,
  output logic x_out,
  output logic y_out
);
  logic xs, ys;      // LiteSync outputs    (SCC ~ +1)
  logic xd, yd;      // LiteDesync outputs  (SCC ~ -1)
  logic sp_raw;      // select stream, P(1) = p
  logic sp_agg;      // select stream after aggregation

  lite_sync #(.D(D), .INIT_STATE(SYNC_INIT)) u_sync (
    .clk, .rst_n, .x_in, .y_in, .x_out(xs), .y_out(ys)
  );

  lite_desync #(.D(D), .INIT_STATE(DESYNC_INIT)) u_desync (
    .clk, .rst_n, .x_in, .y_in, .x_out(xd), .y_out(yd)
  );

  sp_generator u_spgen (
    .xs, .ys, .xd, .yd, .sp(sp_raw)
  );

  bit_aggregator #(.L(L), .FLAG_INIT(FLAG_INIT)) u_bagg (
    .clk, .rst_n, .in_bit(sp_raw), .out_bit(sp_agg)
  );

  mix_mux u_mux (
    .sel(sp_agg), .xs, .ys, .xd, .yd, .x_out, .y_out
  );
endmodule
