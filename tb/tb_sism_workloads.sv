// tb_sism_workloads -- the state machine at the two other flow-table sizes
// of the original design: five states by three inputs, and the general
// eight-state, three-input table (codes S0..S7 all used, no unused leaf).
//
// Each machine is programmed through its write port with a random flow table
// and random output codes (every entry written), then run for random one-hot
// inputs; a reference model checks next state and outputs before each edge
// and the state after it. The eight-state machine is also given the general
// table's example transition: from S1 under I2 it must go to N12.
module tb_sism_workloads;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- five states, three inputs, two outputs ----
  logic [2:0] in5;
  logic       we5, owe5;
  logic [2:0] ws5, owss5;
  logic [1:0] wi5, owi5;
  logic [2:0] wc5;
  logic [1:0] owc5;
  logic [2:0] st5, nx5;
  logic [1:0] z5;
  sism_machine #(.NUM_STATES(5), .NUM_INPUTS(3), .NUM_OUTPUTS(2)) m5 (
    .clk(clk), .rst_n(rst_n), .in_sel(in5),
    .ns_we(we5), .ns_wr_state(ws5), .ns_wr_input(wi5), .ns_wr_code(wc5),
    .out_we(owe5), .out_wr_state(owss5), .out_wr_input(owi5), .out_wr_code(owc5),
    .state(st5), .next_state(nx5), .z(z5));

  // ---- eight states, three inputs, one output ----
  logic [2:0] in8;
  logic       we8, owe8;
  logic [2:0] ws8, owss8;
  logic [1:0] wi8, owi8;
  logic [2:0] wc8;
  logic [0:0] owc8;
  logic [2:0] st8, nx8;
  logic [0:0] z8;
  sism_machine #(.NUM_STATES(8), .NUM_INPUTS(3), .NUM_OUTPUTS(1)) m8 (
    .clk(clk), .rst_n(rst_n), .in_sel(in8),
    .ns_we(we8), .ns_wr_state(ws8), .ns_wr_input(wi8), .ns_wr_code(wc8),
    .out_we(owe8), .out_wr_state(owss8), .out_wr_input(owi8), .out_wr_code(owc8),
    .state(st8), .next_state(nx8), .z(z8));

  int unsigned t5 [5][3], o5 [5][3], r5;
  int unsigned t8 [8][3], o8 [8][3], r8;
  int visits5 [5], visits8 [8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int unsigned j5, j8;
    rst_n = 0;
    in5 = 3'b001; in8 = 3'b001;
    {we5, owe5, we8, owe8} = '0;
    {ws5, wi5, wc5, owss5, owi5, owc5} = '0;
    {ws8, wi8, wc8, owss8, owi8, owc8} = '0;
    foreach (visits5[s]) visits5[s] = 0;
    foreach (visits8[s]) visits8[s] = 0;
    #12;
    check(st5 == 0 && st8 == 0, "reset state");
    rst_n = 1;
    // Random tables, except that column I1 counts s -> s+1 so that every
    // state can be reached on purpose.
    for (int s = 0; s < 8; s++)
      for (int j = 0; j < 3; j++) begin
        t8[s][j] = (j == 0) ? (s + 1) % 8 : $urandom % 8;
        o8[s][j] = $urandom % 2;
        if (s < 5) begin
          t5[s][j] = (j == 0) ? (s + 1) % 5 : $urandom % 5;
          o5[s][j] = $urandom % 4;
        end
      end
    // The general table's worked example: S1 under I2 goes to N12.
    t8[1][1] = 6;
    // Write every entry while the machines run; the reference model starts
    // from whatever state they are in once programming is complete.
    for (int s = 0; s < 8; s++)
      for (int j = 0; j < 3; j++) begin
        @(negedge clk);
        we8 = 1; ws8 = 3'(s); wi8 = 2'(j); wc8 = 3'(t8[s][j]);
        owe8 = 1; owss8 = 3'(s); owi8 = 2'(j); owc8 = 1'(o8[s][j]);
        if (s < 5) begin
          we5 = 1; ws5 = 3'(s); wi5 = 2'(j); wc5 = 3'(t5[s][j]);
          owe5 = 1; owss5 = 3'(s); owi5 = 2'(j); owc5 = 2'(o5[s][j]);
        end else begin
          we5 = 0; owe5 = 0;
        end
      end
    @(negedge clk);
    {we5, owe5, we8, owe8} = '0;
    r5 = st5;
    r8 = st8;
    // Count up to S1 with I1, then apply I2: next state must be N12 = S6.
    in5 = 3'b001;
    in8 = 3'b001;
    while (st8 != 3'd1) begin
      @(posedge clk);
      r5 = t5[r5][0];
      #1;
      @(negedge clk);
    end
    r8 = 1;
    in8 = 3'b010;
    #1;
    check(nx8 == 3'd6, "worked example S1 under I2");
    @(posedge clk);
    r5 = t5[r5][0];
    r8 = 6;
    #1;
    check(st8 == 3'd6 && int'(st5) == r5, "worked example transition");
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      j5 = $urandom % 3;
      j8 = $urandom % 3;
      in5 = 3'(1 << j5);
      in8 = 3'(1 << j8);
      #1;
      check(int'(nx5) == t5[r5][j5], "5-state next_state");
      check(int'(z5) == o5[r5][j5], "5-state outputs");
      check(int'(nx8) == t8[r8][j8], "8-state next_state");
      check(int'(z8) == o8[r8][j8], "8-state outputs");
      @(posedge clk);
      r5 = t5[r5][j5];
      r8 = t8[r8][j8];
      #1;
      check(int'(st5) == r5, "5-state state");
      check(int'(st8) == r8, "8-state state");
      visits5[r5]++;
      visits8[r8]++;
      @(negedge clk);
    end
    foreach (visits5[s]) check(visits5[s] > 0, "5-state state visited");
    foreach (visits8[s]) check(visits8[s] > 0, "8-state state visited");
    $display("5-state visits: %p", visits5);
    $display("8-state visits: %p", visits8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
