// ld_sng -- behavioural low-discrepancy stochastic number generator (testbench
// model of the stream source used to evaluate the decorrelator).
//
// A comparator SNG: output bit = (R < B), where B is the binary value and R
// the t-th point of the first Sobol dimension, which for a 2^N-point
// sequence is the N-bit reversal of t. All instances that share t produce
// fully correlated streams (SCC = +1). Combinational.
module ld_sng #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] t,        // bit index within the stream
  input  logic [N:0]   value,    // B, 0..2^N
  output logic         bit_out
);
  logic [N-1:0] r;
  always_comb begin
    for (int i = 0; i < int'(N); i++) r[i] = t[N-1-i];
    bit_out = ({1'b0, r} < value);
  end
endmodule
