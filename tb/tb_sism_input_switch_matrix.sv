// tb_sism_input_switch_matrix -- self-checking test of the input switch
// matrix. Random code bits are applied with every one-hot input state and
// each output row is compared with the code bit of that row in the selected
// column, read straight from the stimulus. Also checks that no input selects
// nothing and that two inputs OR their columns.
module tb_sism_input_switch_matrix;
  localparam int unsigned S = 6;
  localparam int unsigned I = 3;

  logic [I-1:0]   in_sel;
  logic [S*I-1:0] code_bits;
  logic [S-1:0]   column;
  int checks = 0, failures = 0;

  sism_input_switch_matrix #(.NUM_STATES(S), .NUM_INPUTS(I)) dut (
    .in_sel(in_sel), .code_bits(code_bits), .column(column));

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
        #1;
        for (int s = 0; s < S; s++) begin
          checks++;
          if (column[s] !== code_bits[s*I + j]) begin
            failures++;
            $display("row %0d col %0d: got %b want %b", s, j, column[s], code_bits[s*I + j]);
          end
        end
      end
      in_sel = '0;
      #1;
      checks++;
      if (column !== '0) begin failures++; $display("no input: got %b", column); end
      in_sel = 3'b101;
      #1;
      for (int s = 0; s < S; s++) begin
        checks++;
        if (column[s] !== (code_bits[s*I] | code_bits[s*I + 2])) begin
          failures++;
          $display("two inputs row %0d wrong", s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
