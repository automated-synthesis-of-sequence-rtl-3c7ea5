// sism_state_register -- the D flip-flops that hold the present state
// variables y of a sequence invariant state machine.
//
// Each flip-flop loads its next state bit Y on every rising clock edge, so a
// transition takes one clock: the input and present state seen before the
// edge decide the state after it. The outputs are fed back to the next state
// logic. The active-low asynchronous reset forces RESET_STATE; the default 0
// is the first state declared in the flow table. The reset itself is this
// design's addition: the flow table only suggests making the first state the
// reset state.
//
// Interface: clk, rst_n (async, active low), d = Y, q = y.
module sism_state_register #(
  parameter int unsigned             STATE_BITS  = 3,
  parameter logic [STATE_BITS-1:0]   RESET_STATE = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [STATE_BITS-1:0] d,
  output logic [STATE_BITS-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_STATE;
    else        q <= d;
  end

endmodule
