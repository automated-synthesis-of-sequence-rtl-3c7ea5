// sism_next_state_logic -- binary tree switch (BTS) next state logic of one
// state bit.
//
// The column of candidate next-state bits from the input switch matrix, one
// per present state, enters the leaves of a binary tree of two-way switches.
// The present state variables steer the tree so that exactly one path, the
// one that decodes the present state, connects a leaf to the output Y. As in
// the eight-state circuit of the original design, the least significant state
// variable switches the first level (rows S(2k) and S(2k+1)), and the most
// significant one switches the root. States are binary coded, S0 = 0.
//
// When NUM_STATES is not a power of two the tree keeps its full
// 2**STATE_BITS leaves; the leaves of unused codes are tied to 0 (this
// design's choice), so an unused present state steers the machine to state 0.
//
// Interface
//   column  candidate bit for every present state (index = state code)
//   y       present state variables
//   next_y  selected bit, the next state bit Y
// Purely combinational; depth STATE_BITS switch levels.
module sism_next_state_logic
  import sism_pkg::*;
#(
  parameter int unsigned NUM_STATES = 6,
  localparam int unsigned STATE_BITS = state_bits(NUM_STATES)
) (
  input  logic [NUM_STATES-1:0] column,
  input  logic [STATE_BITS-1:0] y,
  output logic                  next_y
);

  localparam int unsigned LEAVES = 1 << STATE_BITS;

  // node[l] holds the outputs of tree level l; level 0 are the leaves.
  logic [LEAVES-1:0] node [STATE_BITS+1];

  always_comb begin
    node[0] = '0;
    node[0][NUM_STATES-1:0] = column;
    for (int l = 1; l <= STATE_BITS; l++) begin
      node[l] = '0;
      for (int k = 0; k < (LEAVES >> l); k++)
        node[l][k] = y[l-1] ? node[l-1][2*k+1] : node[l-1][2*k];
    end
  end

  assign next_y = node[STATE_BITS][0];

endmodule
