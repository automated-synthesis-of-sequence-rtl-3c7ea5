// tb_sism_next_state_logic -- self-checking test of the binary tree switch.
// Two instances, six states (default, not a power of two) and eight states,
// are driven with random columns for every present-state code; the output
// must equal the column bit indexed by the code, and 0 for unused codes.
module tb_sism_next_state_logic;
  logic [5:0] col6;
  logic [2:0] y6;
  logic       o6;
  logic [7:0] col8;
  logic [2:0] y8;
  logic       o8;
  int checks = 0, failures = 0;

  sism_next_state_logic dut6 (.column(col6), .y(y6), .next_y(o6));
  sism_next_state_logic #(.NUM_STATES(8)) dut8 (.column(col8), .y(y8), .next_y(o8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      col6 = 6'($urandom);
      col8 = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        y6 = 3'(s);
        y8 = 3'(s);
        #1;
        checks++;
        if (o6 !== ((s < 6) ? col6[s] : 1'b0)) begin
          failures++;
          $display("6-state: col %b y %0d got %b", col6, s, o6);
        end
        checks++;
        if (o8 !== col8[s]) begin
          failures++;
          $display("8-state: col %b y %0d got %b", col8, s, o8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
