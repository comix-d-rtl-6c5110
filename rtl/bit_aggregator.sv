// bit_aggregator -- BitAggregator of CoMix-D.
//
// Regroups a bit stream into long runs of 1s and 0s while keeping its count
// of 1s, so that the mixing select no longer follows the data streams it was
// derived from. The output is a flag register. Every input bit that differs
// from the flag is counted in an L-bit counter (the bit itself is emitted as
// the flag value, i.e. deferred); on the 2^L-th such bit the flag toggles and
// the counter wraps to 0. While the flag is 1, 2^L input 0s are turned into
// 1s; while it is 0, 2^L input 1s are turned into 0s, so each full flag cycle
// leaves the number of 1s unchanged. Example with L = 2, flag starting at 1:
//   in  110100110110011
//   out 111111111000000
//
// Interface: in_bit is sampled on the rising clk edge; out_bit is the current
// flag (registered, it does not depend on in_bit combinationally, so the
// output of a cycle is fixed before that cycle's input arrives). rst_n is
// asynchronous, active low: flag = FLAG_INIT, counter = 0. The initial values
// are this design's choice; FLAG_INIT = 1 reproduces the published examples.
module bit_aggregator #(
  parameter int unsigned L         = 4,
  parameter bit          FLAG_INIT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,
  output logic out_bit
);
  logic         flag_q;
  logic [L-1:0] cnt_q;

  assign out_bit = flag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag_q <= FLAG_INIT;
      cnt_q  <= '0;
    end else if (in_bit != flag_q) begin
      if (cnt_q == '1) begin    // this is the 2^L-th differing bit
        flag_q <= ~flag_q;
        cnt_q  <= '0;
      end else begin
        cnt_q  <= cnt_q + 1'b1;
      end
    end
  end

  initial assert (L >= 1) else $error("bit_aggregator: L must be at least 1");
endmodule
