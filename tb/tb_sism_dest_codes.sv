// tb_sism_dest_codes -- self-checking test of the destination code store.
// After reset the store must hold the six-state, three-input example flow
// table (written out here literally, a..f = 0..5); random writes, including
// ones outside the table that must be ignored, are mirrored in a reference
// array and compared entry by entry after every clock.
module tb_sism_dest_codes;
  localparam int unsigned S = 6;
  localparam int unsigned I = 3;
  localparam int unsigned B = 3;

  // Example flow table: rows a..f, columns I1..I3.
  localparam int unsigned EXAMPLE [S][I] = '{
    '{2, 1, 0}, '{3, 2, 1}, '{4, 3, 2}, '{5, 4, 3}, '{0, 5, 4}, '{1, 0, 5}};

  logic           clk = 0;
  logic           rst_n;
  logic           we;
  logic [2:0]     wr_state;
  logic [1:0]     wr_input;
  logic [B-1:0]   wr_code;
  logic [S*I*B-1:0] codes;
  int unsigned    ref_t [S][I];
  int checks = 0, failures = 0;

  sism_dest_codes dut (
    .clk(clk), .rst_n(rst_n), .we(we), .wr_state(wr_state),
    .wr_input(wr_input), .wr_code(wr_code), .codes(codes));

  always #5 clk = ~clk;

  task automatic compare(input string what);
    for (int s = 0; s < S; s++)
      for (int j = 0; j < I; j++) begin
        checks++;
        if (int'(codes[(s*I + j)*B +: B]) != ref_t[s][j]) begin
          failures++;
          $display("%s: entry (%0d,%0d) got %0d want %0d", what, s, j,
                   codes[(s*I + j)*B +: B], ref_t[s][j]);
        end
      end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; wr_state = 0; wr_input = 0; wr_code = 0;
    ref_t = EXAMPLE;
    #12;
    compare("after reset");
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we       = ($urandom % 4) != 0;
      wr_state = 3'($urandom);
      wr_input = 2'($urandom);
      wr_code  = 3'($urandom % S);
      @(posedge clk);
      if (we && wr_state < S && wr_input < I) ref_t[wr_state][wr_input] = wr_code;
      #1;
      compare("after write");
    end
    rst_n = 0;
    ref_t = EXAMPLE;
    #1;
    compare("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
