// lite_desync -- LiteDesync correlation manipulator.
//
// Pushes the SCC of a bit-stream pair toward -1 by turning matching bit pairs
// into mismatching ones. X is passed through untouched; only Y is edited, and
// each inserted 1 is removed again later so that Y keeps its count of 1s:
//   * pair X=0,Y=0 ('00') while fewer than D 1s are owed -> output '01',
//     one more 1 owed;
//   * pair X=1,Y=1 ('11') while a 1 is owed               -> output '10',
//     one fewer owed;
//   * every other pair passes unchanged.
// With D = 1 this is the two-state machine S0/S1 of the CoMix-D LiteDesync.
// For D > 1 the state is a saturating counter 0..D, this design's reading of
// the parameter D.
//
// Interface and timing as lite_sync (x_out is always x_in): Mealy outputs in
// the same cycle, state on the rising clk edge, asynchronous active-low reset
// to INIT_STATE.
module lite_desync #(
  parameter int unsigned D          = 1,
  parameter int unsigned INIT_STATE = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic x_in,
  input  logic y_in,
  output logic x_out,
  output logic y_out
);
  localparam int unsigned SW = (D < 1) ? 1 : $clog2(D + 1);

  logic [SW-1:0] owed_q, owed_d;

  always_comb begin
    owed_d = owed_q;
    x_out  = x_in;
    y_out  = y_in;
    if (!x_in && !y_in && (owed_q < SW'(D))) begin
      y_out  = 1'b1;              // '00' -> '01'
      owed_d = owed_q + 1'b1;
    end else if (x_in && y_in && (owed_q != '0)) begin
      y_out  = 1'b0;              // '11' -> '10'
      owed_d = owed_q - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owed_q <= SW'(INIT_STATE);
    else        owed_q <= owed_d;
  end

  // The number of owed 1s never leaves 0..D (the reset value included).
  a_owed_range: assert property (@(posedge clk) owed_q <= SW'(D))
    else $error("%m: state out of range");

  initial begin
    assert (D >= 1) else $error("lite_desync: D must be at least 1");
    assert (INIT_STATE <= D) else $error("lite_desync: INIT_STATE must be within 0..D");
  end
endmodule
