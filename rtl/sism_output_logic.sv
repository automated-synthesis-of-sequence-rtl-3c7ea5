// sism_output_logic -- output-equation forming logic of a sequence invariant
// state machine.
//
// The logic that computes next states can equally compute outputs: each
// output bit gets its own state bit cell (input switch matrix plus binary
// tree switch), fed with one bit of an output code per flow-table entry,
// and with no feedback and no flip-flop. The present state comes from the
// machine's state register. Output k is therefore
//     z[k] = bit k of O(present state, selected input column),
// a Mealy output that, like the next state logic, is invariant with respect
// to the programmed behaviour: only the output codes change.
//
// Interface
//   in_sel     one-hot input state
//   out_codes  output codes, entry (s, j) at (s*NUM_INPUTS + j)*NUM_OUTPUTS
//   y          present state variables
//   z          outputs
// Purely combinational.
module sism_output_logic
  import sism_pkg::*;
#(
  parameter int unsigned NUM_STATES  = 6,
  parameter int unsigned NUM_INPUTS  = 3,
  parameter int unsigned NUM_OUTPUTS = 2,
  localparam int unsigned STATE_BITS = state_bits(NUM_STATES),
  localparam int unsigned ENTRIES    = NUM_STATES * NUM_INPUTS
) (
  input  logic [NUM_INPUTS-1:0]          in_sel,
  input  logic [ENTRIES*NUM_OUTPUTS-1:0] out_codes,
  input  logic [STATE_BITS-1:0]          y,
  output logic [NUM_OUTPUTS-1:0]         z
);

  for (genvar k = 0; k < NUM_OUTPUTS; k++) begin : g_out
    logic [ENTRIES-1:0] code_bits;  // bit k of every output code

    always_comb
      for (int e = 0; e < ENTRIES; e++)
        code_bits[e] = out_codes[e*NUM_OUTPUTS + k];

    sism_state_bit_slice #(
      .NUM_STATES(NUM_STATES),
      .NUM_INPUTS(NUM_INPUTS)
    ) u_slice (
      .in_sel   (in_sel),
      .code_bits(code_bits),
      .y        (y),
      .next_y   (z[k])
    );
  end

endmodule
