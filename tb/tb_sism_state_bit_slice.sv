// tb_sism_state_bit_slice -- self-checking test of one state bit cell.
// For random code bits, every input column and every present state, the
// cell's output must be the code bit of (present state, column); unused
// state codes give 0.
module tb_sism_state_bit_slice;
  localparam int unsigned S = 6;
  localparam int unsigned I = 3;

  logic [I-1:0]   in_sel;
  logic [S*I-1:0] code_bits;
  logic [2:0]     y;
  logic           next_y;
  logic           want;
  int checks = 0, failures = 0;

  sism_state_bit_slice #(.NUM_STATES(S), .NUM_INPUTS(I)) dut (
    .in_sel(in_sel), .code_bits(code_bits), .y(y), .next_y(next_y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      code_bits = (S*I)'({$urandom, $urandom});
      for (int j = 0; j < I; j++) begin
        in_sel = '0;
        in_sel[j] = 1'b1;
        for (int s = 0; s < 8; s++) begin
          y = 3'(s);
          #1;
          want = (s < S) ? code_bits[s*I + j] : 1'b0;
          checks++;
          if (next_y !== want) begin
            failures++;
            $display("state %0d col %0d: got %b want %b", s, j, next_y, want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
