// tb_sism_state_register -- self-checking test of the state flip-flops:
// asynchronous reset to the reset state (also in mid-cycle), and one-clock
// load of random next states.
module tb_sism_state_register;
  logic       clk = 0;
  logic       rst_n;
  logic [2:0] d, q;
  logic [2:0] expect_q;
  int checks = 0, failures = 0;

  sism_state_register #(.STATE_BITS(3), .RESET_STATE(3'd5)) dut (
    .clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    d = 3'd2;
    #12;
    checks++;
    if (q !== 3'd5) begin failures++; $display("reset value %0d", q); end
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      d = 3'($urandom);
      expect_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("load: got %0d want %0d", q, expect_q); end
      if (t == 50) begin
        #2 rst_n = 0;
        #1;
        checks++;
        if (q !== 3'd5) begin failures++; $display("async reset not immediate"); end
        @(negedge clk) rst_n = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
