// sism_dest_codes -- store of the destination state codes, i.e. the
// programmed flow table of a sequence invariant state machine.
//
// In the original circuit the flow table is fixed by a programming mask laid
// over the input switch matrix, which ties every code bit to power or ground.
// Here the mask is the parameter MASK and the codes sit in a register array
// that the reset loads from MASK. A write port (this design's addition) lets
// a single entry N(s, j) be replaced at run time, so the same hardware can be
// re-programmed for another flow table of the same size without
// re-synthesis. The same module holds output codes for the output-equation
// logic.
//
// Interface
//   we, wr_state, wr_input, wr_code  write N(wr_state, wr_input) = wr_code on
//                                    the rising clock edge when we is high
//   codes   all entries, flat: entry (s, j) at (s*NUM_INPUTS + j)*CODE_BITS
// A write is visible on codes right after the clock edge that takes it.
// Writes to a state or input outside the table are ignored.
module sism_dest_codes
  import sism_pkg::*;
#(
  parameter int unsigned NUM_STATES = 6,
  parameter int unsigned NUM_INPUTS = 3,
  parameter int unsigned CODE_BITS  = state_bits(NUM_STATES),
  localparam int unsigned ENTRIES   = NUM_STATES * NUM_INPUTS,
  localparam int unsigned SI_BITS   = index_bits(NUM_STATES),
  localparam int unsigned II_BITS   = index_bits(NUM_INPUTS),
  parameter logic [ENTRIES*CODE_BITS-1:0] MASK =
      (ENTRIES*CODE_BITS)'(flow_table_rotate(NUM_STATES, NUM_INPUTS))
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         we,
  input  logic [SI_BITS-1:0]           wr_state,
  input  logic [II_BITS-1:0]           wr_input,
  input  logic [CODE_BITS-1:0]         wr_code,
  output logic [ENTRIES*CODE_BITS-1:0] codes
);

  logic [ENTRIES*CODE_BITS-1:0] table_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      table_q <= MASK;
    end else if (we && (int'(wr_state) < NUM_STATES) && (int'(wr_input) < NUM_INPUTS)) begin
      table_q[(int'(wr_state)*NUM_INPUTS + int'(wr_input))*CODE_BITS +: CODE_BITS] <= wr_code;
    end
  end

  assign codes = table_q;

endmodule
