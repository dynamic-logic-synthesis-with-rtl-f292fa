// remainder_compare: remainder register and compare block for early
// termination of the divider ring.
//
// The thesis observes that if the state entering the ring is the same after
// one more loop, every later loop repeats the same quotient digits, so the
// iteration can stop. At the end of each loop `capture` stores the token
// leaving the last stage (`cur`); at the start of the next loop `advance`
// moves it to `prev`. `equal` is high when the current token equals the one
// stored a loop earlier. The thesis compares "the remainder"; this design
// compares the whole token (both carry-save vectors, the last digit and the
// force-ahead flag), because the next loop's digits depend on all of them.
// `clear` forgets the stored tokens before a new division.
module remainder_compare #(
  parameter int unsigned TW = 34
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          capture,
  input  logic          advance,
  input  logic [TW-1:0] cur,
  output logic [TW-1:0] last,
  output logic          equal
);

  logic [TW-1:0] prev;
  logic          have_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last      <= '0;
      prev      <= '0;
      have_prev <= 1'b0;
    end else if (clear) begin
      have_prev <= 1'b0;
    end else begin
      if (capture) last <= cur;
      if (advance) begin
        prev      <= last;
        have_prev <= 1'b1;
      end
    end
  end

  assign equal = have_prev && (cur == prev);

endmodule
