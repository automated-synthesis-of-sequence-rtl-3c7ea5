// sism_input_switch_matrix -- input switch matrix of one state bit.
//
// The flow table's destination state codes are presented to the matrix, one
// bit of each code per instance (the matrix is identical for every state
// variable bit). The input lines select one column of the flow table and the
// matrix passes that column -- one bit per present state -- on to the next
// state logic. In the original circuit every row is a chain of pass
// transistors gated by I1..In whose outputs are wired together; here each row
// is the OR over columns of (input line AND code bit), which is the same
// function when exactly one input line is high (the input state). Outside
// that rule, which the machine asserts, this design's choice is: with no
// input line high a row reads 0, and with several high their bits are ORed.
//
// Interface
//   in_sel    one-hot input state, bit j = input column I(j+1)
//   code_bits bit b of every destination code, index s*NUM_INPUTS + j
//   column    bit b of N(s, selected column) for every present state s
// Purely combinational.
module sism_input_switch_matrix #(
  parameter int unsigned NUM_STATES = 6,
  parameter int unsigned NUM_INPUTS = 3
) (
  input  logic [NUM_INPUTS-1:0]            in_sel,
  input  logic [NUM_STATES*NUM_INPUTS-1:0] code_bits,
  output logic [NUM_STATES-1:0]            column
);

  always_comb begin
    column = '0;
    for (int s = 0; s < NUM_STATES; s++)
      for (int j = 0; j < NUM_INPUTS; j++)
        column[s] = column[s] | (in_sel[j] & code_bits[s*NUM_INPUTS + j]);
  end

endmodule
