// lite_sync -- LiteSync correlation manipulator.
//
// Pushes the stochastic-computing correlation (SCC) of a bit-stream pair toward
// +1 by turning mismatching bit pairs into matching ones. X is passed through
// untouched; only Y is edited, and every edit is paid back later so that the
// number of 1s in Y is kept (up to the D bits the FSM may still owe):
//   * pair X=1,Y=0 ('10') while fewer than D 1s are owed -> output '11',
//     one more 1 owed;
//   * pair X=0,Y=1 ('01') while a 1 is owed               -> output '00',
//     one fewer owed;
//   * every other pair passes unchanged.
// With D = 1 this is exactly the two-state machine S0/S1 of the CoMix-D
// LiteSync (S0 = nothing owed, S1 = one owed). For D > 1 the state is a
// saturating counter 0..D; that generalisation is this design's reading of the
// parameter D, whose internal structure beyond D = 1 is not spelled out.
//
// Interface: one bit of each stream per clock; x_out is always x_in (only Y
// is edited). y_out is combinational from x_in/y_in and the current state
// (Mealy, zero-cycle latency); the state updates on the rising edge of clk.
// rst_n is asynchronous, active low, and loads INIT_STATE (the FSM may start
// in any state; S0 is its marked initial state).
module lite_sync #(
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
    if (x_in && !y_in && (owed_q < SW'(D))) begin
      y_out  = 1'b1;              // '10' -> '11'
      owed_d = owed_q + 1'b1;
    end else if (!x_in && y_in && (owed_q != '0)) begin
      y_out  = 1'b0;              // '01' -> '00'
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
    assert (D >= 1) else $error("lite_sync: D must be at least 1");
    assert (INIT_STATE <= D) else $error("lite_sync: INIT_STATE must be within 0..D");
  end
endmodule
