// sism_state_bit_slice -- one state bit cell of a sequence invariant state
// machine.
//
// Because of sequence invariance the logic in front of every state flip-flop
// is the same: an input switch matrix that selects the flow-table column of
// the present input, followed by a binary tree switch that picks the row of
// the present state. This cell is that pair for one state variable bit; a
// machine instantiates it once per state bit, each fed with its own bit of
// the destination state codes. The same cell, fed with output codes instead
// of destination codes and without feedback, forms output equations.
//
// Interface
//   in_sel     one-hot input state
//   code_bits  bit b of every destination code, index s*NUM_INPUTS + j
//   y          present state variables
//   next_y     bit b of N(present state, input column)
// Purely combinational.
module sism_state_bit_slice
  import sism_pkg::*;
#(
  parameter int unsigned NUM_STATES = 6,
  parameter int unsigned NUM_INPUTS = 3,
  localparam int unsigned STATE_BITS = state_bits(NUM_STATES)
) (
  input  logic [NUM_INPUTS-1:0]            in_sel,
  input  logic [NUM_STATES*NUM_INPUTS-1:0] code_bits,
  input  logic [STATE_BITS-1:0]            y,
  output logic                             next_y
);

  logic [NUM_STATES-1:0] column;  // all next states of the selected column

  sism_input_switch_matrix #(
    .NUM_STATES(NUM_STATES),
    .NUM_INPUTS(NUM_INPUTS)
  ) u_ism (
    .in_sel   (in_sel),
    .code_bits(code_bits),
    .column   (column)
  );

  sism_next_state_logic #(
    .NUM_STATES(NUM_STATES)
  ) u_nsl (
    .column(column),
    .y     (y),
    .next_y(next_y)
  );

endmodule
