// tb_sism_machine -- end-to-end test of the complete state machine at its
// default size (six states, three inputs, two outputs, the example flow
// table programmed by the reset mask).
//
// A reference model holds the flow table and output table, written out
// independently of the design, and follows every write the test makes. Each
// clock the test drives a random one-hot input state and checks the
// combinational next state and outputs before the edge and the state after
// it (one transition per clock). The run covers, and counts:
//   - reset to the first state a, and a mid-run reset that also restores the
//     programmed flow table,
//   - every input column selected and every state visited,
//   - self-loops (column I3 of the example keeps the state) and wrap from f,
//   - run-time writes of single destination codes and of output codes,
//   - re-programming the whole table to a different sequence on the same
//     hardware (sequence invariance),
//   - non-zero outputs from the output logic.
// A mechanism that never happened counts as a failure.
module tb_sism_machine;
  localparam int unsigned S = 6;
  localparam int unsigned I = 3;
  localparam int unsigned K = 2;

  localparam int unsigned EXAMPLE [S][I] = '{
    '{2, 1, 0}, '{3, 2, 1}, '{4, 3, 2}, '{5, 4, 3}, '{0, 5, 4}, '{1, 0, 5}};

  logic       clk = 0;
  logic       rst_n;
  logic [2:0] in_sel;
  logic       ns_we, out_we;
  logic [2:0] ns_wr_state, out_wr_state;
  logic [1:0] ns_wr_input, out_wr_input;
  logic [2:0] ns_wr_code;
  logic [1:0] out_wr_code;
  logic [2:0] state, next_state;
  logic [1:0] z;

  int unsigned ns_ref  [S][I];
  int unsigned out_ref [S][I];
  int unsigned st_ref;
  int checks = 0, failures = 0;
  int cnt_col [I];
  int cnt_visit [S];
  int cnt_reset = 0, cnt_selfloop = 0, cnt_wrap = 0, cnt_ns_write = 0;
  int cnt_out_write = 0, cnt_reprogram = 0, cnt_z_nonzero = 0;

  sism_machine dut (
    .clk(clk), .rst_n(rst_n), .in_sel(in_sel),
    .ns_we(ns_we), .ns_wr_state(ns_wr_state), .ns_wr_input(ns_wr_input),
    .ns_wr_code(ns_wr_code),
    .out_we(out_we), .out_wr_state(out_wr_state), .out_wr_input(out_wr_input),
    .out_wr_code(out_wr_code),
    .state(state), .next_state(next_state), .z(z));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t state=%0d ref=%0d)", what, $time, state, st_ref);
    end
  endtask

  // One clock with input column j (and whatever writes are set up); checks
  // the outputs before the edge and the state after it. Called between
  // clock edges; returns 1 time unit after the rising edge.
  task automatic step(input int unsigned j);
    int unsigned nxt;
    in_sel = 3'(1 << j);
    #1;
    nxt = ns_ref[st_ref][j];
    check(int'(next_state) == nxt, "next_state");
    check(int'(z) == out_ref[st_ref][j], "outputs z");
    cnt_col[j]++;
    if (z != 0) cnt_z_nonzero++;
    if (nxt == st_ref) cnt_selfloop++;
    if (st_ref == S-1 && nxt == 0) cnt_wrap++;
    @(posedge clk);
    if (ns_we) begin ns_ref[ns_wr_state][ns_wr_input] = ns_wr_code; cnt_ns_write++; end
    if (out_we) begin out_ref[out_wr_state][out_wr_input] = out_wr_code; cnt_out_write++; end
    st_ref = nxt;
    cnt_visit[st_ref]++;
    #1;
    check(int'(state) == st_ref, "state after edge");
    ns_we = 0;
    out_we = 0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    #1;
    ns_ref = EXAMPLE;
    foreach (out_ref[s, j]) out_ref[s][j] = 0;
    st_ref = 0;
    check(state == 3'd0, "reset state");
    check(z == 2'd0, "reset outputs");
    cnt_reset++;
    @(negedge clk);
    rst_n = 1;
    #1;
  endtask

  initial begin
    rst_n = 0; in_sel = 3'b001;
    ns_we = 0; ns_wr_state = 0; ns_wr_input = 0; ns_wr_code = 0;
    out_we = 0; out_wr_state = 0; out_wr_input = 0; out_wr_code = 0;
    foreach (cnt_col[j]) cnt_col[j] = 0;
    foreach (cnt_visit[s]) cnt_visit[s] = 0;
    do_reset();

    // Phase 1: the example machine from its reset mask.
    // Deterministic walk a -I1-> c -I1-> e -I1-> a -I2-> b -I3-> b
    begin
      int unsigned walk_in [6] = '{0, 0, 0, 1, 2, 1};
      int unsigned walk_st [6] = '{2, 4, 0, 1, 1, 2};
      for (int n = 0; n < 6; n++) begin
        step(walk_in[n]);
        check(int'(state) == walk_st[n], "documented walk");
      end
    end
    for (int n = 0; n < 200; n++) step($urandom % I);

    // Phase 2: run-time writes of single entries while running.
    for (int n = 0; n < 200; n++) begin
      if ($urandom % 3 == 0) begin
        ns_we = 1;
        ns_wr_state = 3'($urandom % S);
        ns_wr_input = 2'($urandom % I);
        ns_wr_code  = 3'($urandom % S);
      end
      if ($urandom % 2 == 0) begin
        out_we = 1;
        out_wr_state = 3'($urandom % S);
        out_wr_input = 2'($urandom % I);
        out_wr_code  = 2'($urandom);
      end
      step($urandom % I);
    end

    // Phase 3: re-program the whole table to a different sequence:
    // N(s, j) = (s + S - 1 - j) mod S, the example run backwards.
    for (int s = 0; s < S; s++)
      for (int j = 0; j < I; j++) begin
        ns_we = 1;
        ns_wr_state = 3'(s);
        ns_wr_input = 2'(j);
        ns_wr_code  = 3'((s + S - 1 - j) % S);
        step(2);  // I3 column kept as self-loop until it is rewritten
      end
    cnt_reprogram++;
    for (int n = 0; n < 200; n++) step($urandom % I);

    // Phase 4: mid-run reset restores the mask and state a.
    do_reset();
    step(0);
    check(state == 3'd2, "example table restored after reset");
    for (int n = 0; n < 50; n++) step($urandom % I);

    // Every mechanism must have happened.
    foreach (cnt_col[j]) check(cnt_col[j] > 0, "input column used");
    foreach (cnt_visit[s]) check(cnt_visit[s] > 0, "state visited");
    check(cnt_reset >= 2, "resets");
    check(cnt_selfloop > 0, "self-loops");
    check(cnt_wrap > 0, "wrap from the last state");
    check(cnt_ns_write > 0, "destination code writes");
    check(cnt_out_write > 0, "output code writes");
    check(cnt_reprogram > 0, "whole-table re-programming");
    check(cnt_z_nonzero > 0, "non-zero outputs");
    $display("columns I1..I3: %0d %0d %0d", cnt_col[0], cnt_col[1], cnt_col[2]);
    $display("resets %0d self-loops %0d wraps %0d code writes %0d output writes %0d reprograms %0d nonzero z %0d",
             cnt_reset, cnt_selfloop, cnt_wrap, cnt_ns_write, cnt_out_write, cnt_reprogram, cnt_z_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
