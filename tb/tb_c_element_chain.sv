// tb_c_element_chain: test of the C-element wave chain (N = 5).
//
// 1. Latency: with a free-flowing end (sink follows the last element), a
//    change at the input reaches element i exactly i+1 clocks later, and
//    every earlier element already shows it.
// 2. Back-pressure: with the end blocked (sink held), toggling the input
//    many times fills the chain with alternating values from the end, and
//    no further change enters: the chain holds exactly N transitions.
// 3. Release: freeing the end lets the stored waves drain out one by one,
//    ending with every element equal to the input.
// 4. Random: random input and sink sequences, checking each clock that an
//    element changed only when its predecessor and successor differed and
//    then took the predecessor's value.
// A watchdog ends the run if it hangs.
module tb_c_element_chain;

  localparam int unsigned N = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in = 1'b0;
  logic sink;
  logic free_end = 1'b1;
  logic sink_hold = 1'b0;
  logic [N-1:0] state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign sink = free_end ? state[N-1] : sink_hold;

  c_element_chain #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in(in), .sink(sink), .state(state));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (state=%b)", what, state);
    end
  endtask

  // rule check: the values seen at each rising edge decide what every
  // element must show afterwards; checked half a period later
  logic rule_on = 1'b0;
  logic [N+1:0] snap;
  always @(posedge clk) snap <= {sink, state, in};
  always @(negedge clk) begin
    if (rule_on) begin
      for (int i = 0; i < N; i++) begin
        if (snap[i] != snap[i+2]) check(state[i] == snap[i], $sformatf("element %0d did not copy", i));
        else                      check(state[i] == snap[i+1], $sformatf("element %0d did not hold", i));
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. latency of a rising wave through an empty, free-flowing chain
    in = 1'b1;
    for (int t = 1; t <= N; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        check(state[i] == (i < t), $sformatf("wave front after %0d clocks", t));
    end
    in = 1'b0;
    repeat (N) @(negedge clk);
    check(state == '0, "falling wave did not clear the chain");

    // 2. blocked end: sink held at 0 (the element behind never takes a wave)
    free_end = 1'b0;
    sink_hold = 1'b0;
    for (int k = 0; k < 4 * N; k++) begin
      in = ~in;
      repeat (3) @(negedge clk);
    end
    repeat (N) @(negedge clk);
    begin
      int changes;
      changes = 0;
      for (int i = 0; i < N; i++)
        check(state[i] == (((N - 1 - i) % 2) == 0), "blocked chain not alternating");
      for (int i = 0; i + 1 < N; i++) if (state[i] != state[i+1]) changes++;
      check(changes == N - 1, "blocked chain does not hold N waves");
    end

    // 3. release the end and drain
    free_end = 1'b1;
    repeat (3 * N) @(negedge clk);
    for (int i = 0; i < N; i++) check(state[i] == in, "chain did not drain to the input value");

    // 4. random stimulus with the copy/hold rule checked each clock
    free_end = 1'b0;
    for (int k = 0; k < 400; k++) begin
      in = 1'($urandom);
      sink_hold = 1'($urandom);
      @(negedge clk);
      rule_on = 1'b1;
    end
    rule_on = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
