// sism_pkg -- constants and helpers shared by the sequence invariant state
// machine (SISM) modules.
//
// A flow table with NUM_STATES rows (present states) and NUM_INPUTS columns
// (input states) is carried between modules as one flat packed vector of
// destination state codes. Entry N(s, j), the next state of present state s
// under input column j, occupies
//     codes[(s*NUM_INPUTS + j)*CODE_BITS +: CODE_BITS].
// States are numbered in declaration order from 0, so state 0 is the first
// state of the flow table; this design also makes it the reset state.
//
// flow_table_rotate() builds the example flow table used as the default
// programming: N(s, j) = (s + NUM_INPUTS-1-j) mod NUM_STATES. For six states
// and three inputs it is exactly the example machine "MACH1" (states a..f):
//     a: c b a   b: d c b   c: e d c   d: f e d   e: a f e   f: b a f
// For other sizes it is this design's own generalisation of that pattern.
package sism_pkg;

  // Number of state variables needed to encode n states (at least one).
  function automatic int unsigned state_bits(input int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  // Width of an index that selects one of n items (at least one bit).
  function automatic int unsigned index_bits(input int unsigned n);
    return (n <= 1) ? 1 : $clog2(n);
  endfunction

  localparam int unsigned MAX_TABLE_BITS = 4096;

  // Example flow table, packed as described above, in the low
  // num_states*num_inputs*state_bits(num_states) bits.
  function automatic logic [MAX_TABLE_BITS-1:0] flow_table_rotate(
      input int unsigned num_states, input int unsigned num_inputs);
    logic [MAX_TABLE_BITS-1:0] t;
    int unsigned cb;
    int unsigned nxt;
    t  = '0;
    cb = state_bits(num_states);
    for (int unsigned s = 0; s < num_states; s++) begin
      for (int unsigned j = 0; j < num_inputs; j++) begin
        nxt = (s + num_inputs - 1 - j) % num_states;
        for (int unsigned b = 0; b < cb; b++)
          t[(s*num_inputs + j)*cb + b] = nxt[b];
      end
    end
    return t;
  endfunction

endpackage
