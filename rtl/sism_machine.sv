// sism_machine -- complete sequence invariant state machine (SISM).
//
// A synchronous controller whose logic depends only on the size of its flow
// table (NUM_STATES rows by NUM_INPUTS columns), never on the sequence it
// runs. The flow table itself is data: a store of destination state codes
// N(s, j). Per state variable bit, an input switch matrix passes the column
// of the present input state to a binary tree switch, which the present
// state steers to the one entry that becomes the next state bit Y; D
// flip-flops take Y on the clock edge and feed it back as y. Output equations
// are formed the same way from a second code store, without feedback.
//
// What follows the original architecture: the block structure (code store,
// input switch matrix, tree next state logic, D flip-flops, replicated
// state bit cells, output logic without feedback), binary state assignment
// in declaration order with S0 = 0, and the default flow table (six states,
// three inputs, the example machine MACH1). This design's own choices: the
// code stores are registers loaded from a mask parameter at reset and
// writable at run time, the asynchronous active-low reset to state 0, the
// number of outputs (NUM_OUTPUTS = 2) with all output codes 0 by default,
// and the value 0 for unused state codes.
//
// Interface
//   clk, rst_n          clock, asynchronous active-low reset (state := 0,
//                       both code stores := their masks)
//   in_sel              one-hot input state, bit j = input I(j+1); it must be
//                       one-hot while out of reset (asserted)
//   ns_we, ns_wr_state, ns_wr_input, ns_wr_code
//                       write one destination state code
//   out_we, out_wr_state, out_wr_input, out_wr_code
//                       write one output code
//   state               present state y
//   next_state          next state Y (combinational)
//   z                   outputs for (present state, input), combinational
// Timing: one transition per clock; state after an edge equals
// N(state, input) before it. A code write takes effect for the next edge.
module sism_machine
  import sism_pkg::*;
#(
  parameter int unsigned NUM_STATES  = 6,
  parameter int unsigned NUM_INPUTS  = 3,
  parameter int unsigned NUM_OUTPUTS = 2,
  localparam int unsigned STATE_BITS = state_bits(NUM_STATES),
  localparam int unsigned ENTRIES    = NUM_STATES * NUM_INPUTS,
  localparam int unsigned SI_BITS    = index_bits(NUM_STATES),
  localparam int unsigned II_BITS    = index_bits(NUM_INPUTS),
  parameter logic [ENTRIES*STATE_BITS-1:0] NS_MASK =
      (ENTRIES*STATE_BITS)'(flow_table_rotate(NUM_STATES, NUM_INPUTS)),
  parameter logic [ENTRIES*NUM_OUTPUTS-1:0] OUT_MASK = '0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_INPUTS-1:0]  in_sel,
  input  logic                   ns_we,
  input  logic [SI_BITS-1:0]     ns_wr_state,
  input  logic [II_BITS-1:0]     ns_wr_input,
  input  logic [STATE_BITS-1:0]  ns_wr_code,
  input  logic                   out_we,
  input  logic [SI_BITS-1:0]     out_wr_state,
  input  logic [II_BITS-1:0]     out_wr_input,
  input  logic [NUM_OUTPUTS-1:0] out_wr_code,
  output logic [STATE_BITS-1:0]  state,
  output logic [STATE_BITS-1:0]  next_state,
  output logic [NUM_OUTPUTS-1:0] z
);

  logic [ENTRIES*STATE_BITS-1:0]  ns_codes;
  logic [ENTRIES*NUM_OUTPUTS-1:0] out_codes;

  // Destination state codes: the programmed flow table.
  sism_dest_codes #(
    .NUM_STATES(NUM_STATES),
    .NUM_INPUTS(NUM_INPUTS),
    .CODE_BITS (STATE_BITS),
    .MASK      (NS_MASK)
  ) u_ns_codes (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (ns_we),
    .wr_state(ns_wr_state),
    .wr_input(ns_wr_input),
    .wr_code (ns_wr_code),
    .codes   (ns_codes)
  );

  // One state bit cell per state variable, each fed with its own code bit.
  for (genvar b = 0; b < STATE_BITS; b++) begin : g_bit
    logic [ENTRIES-1:0] code_bits;

    always_comb
      for (int e = 0; e < ENTRIES; e++)
        code_bits[e] = ns_codes[e*STATE_BITS + b];

    sism_state_bit_slice #(
      .NUM_STATES(NUM_STATES),
      .NUM_INPUTS(NUM_INPUTS)
    ) u_slice (
      .in_sel   (in_sel),
      .code_bits(code_bits),
      .y        (state),
      .next_y   (next_state[b])
    );
  end

  // D flip-flops with the feedback taps y.
  sism_state_register #(
    .STATE_BITS (STATE_BITS),
    .RESET_STATE('0)
  ) u_state (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (next_state),
    .q    (state)
  );

  // Output codes and output-equation logic (no feedback).
  sism_dest_codes #(
    .NUM_STATES(NUM_STATES),
    .NUM_INPUTS(NUM_INPUTS),
    .CODE_BITS (NUM_OUTPUTS),
    .MASK      (OUT_MASK)
  ) u_out_codes (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (out_we),
    .wr_state(out_wr_state),
    .wr_input(out_wr_input),
    .wr_code (out_wr_code),
    .codes   (out_codes)
  );

  sism_output_logic #(
    .NUM_STATES (NUM_STATES),
    .NUM_INPUTS (NUM_INPUTS),
    .NUM_OUTPUTS(NUM_OUTPUTS)
  ) u_outputs (
    .in_sel   (in_sel),
    .out_codes(out_codes),
    .y        (state),
    .z        (z)
  );

  // Rules of use: exactly one input state at a time, and only valid state
  // codes programmed.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // nothing is checked in reset
    end else begin
      a_input_onehot: assert ($onehot(in_sel))
        else $error("in_sel must be one-hot");
      a_code_valid: assert (!ns_we || (int'(ns_wr_code) < NUM_STATES))
        else $error("destination code outside the state range");
    end
  end

endmodule
