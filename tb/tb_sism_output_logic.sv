// tb_sism_output_logic -- self-checking test of the output-equation logic.
// Random output codes (three outputs) are applied; for every input column
// and present state each output bit must equal the bit of the output code
// of that table entry, and 0 for unused state codes.
module tb_sism_output_logic;
  localparam int unsigned S = 6;
  localparam int unsigned I = 3;
  localparam int unsigned K = 3;

  logic [I-1:0]     in_sel;
  logic [S*I*K-1:0] out_codes;
  logic [2:0]       y;
  logic [K-1:0]     z, want;
  int checks = 0, failures = 0;

  sism_output_logic #(.NUM_STATES(S), .NUM_INPUTS(I), .NUM_OUTPUTS(K)) dut (
    .in_sel(in_sel), .out_codes(out_codes), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      out_codes = (S*I*K)'({$urandom, $urandom});
      for (int j = 0; j < I; j++) begin
        in_sel = '0;
        in_sel[j] = 1'b1;
        for (int s = 0; s < 8; s++) begin
          y = 3'(s);
          #1;
          want = (s < S) ? out_codes[(s*I + j)*K +: K] : '0;
          checks++;
          if (z !== want) begin
            failures++;
            $display("state %0d col %0d: got %b want %b", s, j, z, want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
