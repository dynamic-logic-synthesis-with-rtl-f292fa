// tb_srt_divider_ps0: the divider test of tb_srt_divider run on a ring
// whose stages use the PS0 handshake (USE_C = 0: the C element of each
// stage controller replaced by a wire from the successor's completion
// detector), to show the ring also works in that configuration. The
// printed max_cycles can be compared with the PC0 run.
//
// Runs directed and random divisions (dividend in [1, 2), divisor in
// [1, 1.625), the range in which the digit selection is exact, see the
// divider's header) and checks every result against exact integer arithmetic, not
// against a model of the ring: with n digits the hardware must satisfy
//   Y = 2^(n-1) * X - D * (Qi - q_last),  |Y| <= 2 D,
// where Qi = q_pos - q_neg is the quotient scaled by 2^(n-1), q_last the
// last digit and Y the returned carry-save remainder (the one the last
// digit was chosen from), all in the ring's fixed-point format. This is
// the statement that Qi / 2^(n-1) approximates X / D to within 2^-(n-1). It also counts the mechanisms of the design (each digit
// value, the force-ahead flag, early termination, full-length runs and the
// flush of a parked token before a new division) and fails any that never
// happened. A per-division time limit and a global watchdog guard against
// a stalled handshake.
module tb_srt_divider_ps0;
  import st_pkg::*;

  localparam int unsigned FRAC_BITS = 12;
  localparam int unsigned STAGES    = 5;
  localparam int unsigned LOOPS     = 3;
  localparam int unsigned W         = FRAC_BITS + 4;
  localparam int unsigned NDIG      = STAGES * LOOPS;
  localparam int unsigned NRAND     = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [FRAC_BITS:0] dividend = '0, divisor = '0;
  logic busy, done, early;
  logic [NDIG-1:0] q_pos, q_neg;
  logic [W-1:0] rem_s, rem_c;

  int checks = 0, failures = 0;
  int n_pos = 0, n_zero = 0, n_neg = 0, n_force = 0;
  int n_early = 0, n_full = 0, n_flush = 0;
  int max_cycles = 0;

  always #5 clk = ~clk;

  srt_divider #(.USE_C(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend), .divisor(divisor),
    .busy(busy), .done(done), .early(early), .q_pos(q_pos), .q_neg(q_neg),
    .rem_s(rem_s), .rem_c(rem_c)
  );

  // mechanism counters, observed on the ring
  logic [STAGES-1:0] f_prev = '0, q_prev = '0;
  always @(posedge clk) begin
    for (int k = 0; k < STAGES; k++) begin
      if (dut.f_tok[k].t && !f_prev[k]) n_force++;
      if (qd_valid(dut.q_tok[k]) && !q_prev[k]) begin
        if (dut.q_tok[k].p) n_pos++;
        if (dut.q_tok[k].z) n_zero++;
        if (dut.q_tok[k].n) n_neg++;
      end
      f_prev[k] = dut.f_tok[k].t;
      q_prev[k] = qd_valid(dut.q_tok[k]);
    end
    if (dut.flush && !$past(dut.flush)) n_flush++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic divide(input logic [FRAC_BITS:0] x, input logic [FRAC_BITS:0] d);
    longint qi, ql, xy, dy, e, yn;
    logic [W-1:0] ysum;
    int cyc;
    @(negedge clk);
    dividend = x;
    divisor  = d;
    start    = 1'b1;
    @(negedge clk);
    start    = 1'b0;
    dividend = '0;
    divisor  = '0;
    cyc = 0;
    while (!done && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check(done, $sformatf("division %0h/%0h did not finish", x, d));
    if (cyc > max_cycles) max_cycles = cyc;
    check((q_pos & q_neg) == '0, "digit both positive and negative");
    qi = longint'(q_pos) - longint'(q_neg);
    xy = longint'(x) * 2;            // Y_0 = X in the remainder format
    dy = longint'(d) * 2;
    ql = longint'(q_pos[0]) - longint'(q_neg[0]);
    e  = (longint'(1) << (NDIG - 1)) * xy - dy * (qi - ql);
    ysum = rem_s + rem_c;
    yn = longint'($signed(ysum));
    check(e == yn, $sformatf("remainder identity x=%0h d=%0h qi=%0d exp=%0d got=%0d",
                             x, d, qi, e, yn));
    check(e <= 2 * dy && e >= -2 * dy,
          $sformatf("remainder bound x=%0h d=%0h e=%0d", x, d, e));
    if (early) n_early++; else n_full++;
  endtask

  initial begin
    logic [FRAC_BITS:0] x, d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed: equal operands, extremes, periodic quotients
    divide(13'h1000, 13'h1000);  // 1 / 1
    divide(13'h1fff, 13'h1000);  // largest dividend / 1
    divide(13'h1000, 13'h19ff);  // 1 / largest divisor tested
    divide(13'h1fff, 13'h19ff);
    divide(13'h1000, 13'h1800);  // 1 / 1.5
    divide(13'h1800, 13'h1000);  // 1.5 / 1
    // operand pairs whose ring token repeats after a loop (early stop)
    divide(13'h1536, 13'h15eb);
    divide(13'h12fe, 13'h16a5);
    divide(13'h1259, 13'h12a6);
    for (int i = 0; i < NRAND; i++) begin
      x = {1'b1, FRAC_BITS'($urandom)};
      d = 13'h1000 + 13'($urandom % 32'h0a00);   // divisor in [1, 1.625)
      divide(x, d);
    end
    check(n_pos   > 0, "no +1 digit seen");
    check(n_zero  > 0, "no 0 digit seen");
    check(n_neg   > 0, "no -1 digit seen");
    check(n_force > 0, "force-ahead flag never set");
    check(n_early > 0, "early termination never happened");
    check(n_full  > 0, "no full-length division");
    check(n_flush > 0, "parked token never flushed");
    $display("digits +1=%0d 0=%0d -1=%0d force-ahead=%0d early=%0d full=%0d flush=%0d max_cycles=%0d",
             n_pos, n_zero, n_neg, n_force, n_early, n_full, n_flush, max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
