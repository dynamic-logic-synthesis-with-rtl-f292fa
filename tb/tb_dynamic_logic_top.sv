// tb_dynamic_logic_top: end-to-end test of the whole design at its default
// parameters: the divider and the programmable cell side by side.
//
// Divider part, as in tb_srt_divider:
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
// a stalled handshake. Cell part: the cell is programmed with the four
// five-input functions of the thesis' cell comparison (majority, XOR,
// prime, divisible by 3) and evaluated on all 32 inputs each, while the
// divider is busy, through the 4-phase precharge / evaluate sequence.
// Chain part: waves are sent into the C-element chain with its end free;
// each must come out at the last element exactly five clocks after entry.
// Pipeline part: 30 two-bit tokens through the three-stage PC0 pipeline
// between an ideal producer and consumer; each must come out unchanged and
// in order, in steady state one every 12 clocks (3 tF(up) + tF(down) +
// 4 tC + 4 tD with unit delays).
module tb_dynamic_logic_top;
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

  logic cell_eval = 1'b0;
  dr_t [4:0] cell_x = '0;
  logic [15:0][1:0] cell_prog = '0;
  dr_t cell_y;
  int n_cell = 0;
  logic chain_in = 1'b0;
  logic [4:0] chain_state;
  int n_wave = 0;
  dr_t [1:0] pipe_in_data, pipe_out_data;
  logic pipe_in_req, pipe_in_ack, pipe_out_req;
  int n_sent = 0, n_tok = 0, pipe_cyc = 0, pipe_last = -1;
  logic pipe_ack_q = 1'b1, pipe_req_q = 1'b1;
  logic [1:0] pipe_tok;

  dynamic_logic_top top (
    .clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend), .divisor(divisor),
    .busy(busy), .done(done), .early(early), .q_pos(q_pos), .q_neg(q_neg),
    .rem_s(rem_s), .rem_c(rem_c),
    .cell_eval(cell_eval), .cell_x(cell_x), .cell_prog(cell_prog), .cell_y(cell_y),
    .chain_in(chain_in), .chain_sink(chain_state[4]), .chain_state(chain_state),
    .pipe_in_data(pipe_in_data), .pipe_in_req(pipe_in_req), .pipe_in_ack(pipe_in_ack),
    .pipe_out_data(pipe_out_data), .pipe_out_req(pipe_out_req), .pipe_out_ack(pipe_out_req)
  );

  // ideal producer and consumer around the pipeline
  assign pipe_tok = 2'(n_sent * 3 + 1);
  always_comb begin
    for (int j = 0; j < 2; j++)
      pipe_in_data[j] = (rst_n && pipe_in_ack && n_sent < 30) ? dr_enc(pipe_tok[j]) : '0;
    pipe_in_req = !(rst_n && pipe_in_ack && n_sent < 30);
  end
  always @(posedge clk) begin
    pipe_cyc++;
    pipe_ack_q <= pipe_in_ack;
    pipe_req_q <= pipe_out_req;
    if (rst_n && pipe_ack_q && !pipe_in_ack) n_sent++;
    if (rst_n && pipe_req_q && !pipe_out_req) begin
      check({pipe_out_data[1].t, pipe_out_data[0].t} == 2'(n_tok * 3 + 1),
            $sformatf("pipeline token %0d corrupted", n_tok));
      if (n_tok >= 5) check(pipe_cyc - pipe_last == 12,
                            $sformatf("pipeline period %0d, expected 12", pipe_cyc - pipe_last));
      pipe_last = pipe_cyc;
      n_tok++;
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    for (int w = 0; w < 20; w++) begin
      chain_in = ~chain_in;
      repeat (4) @(negedge clk);
      check(chain_state[4] != chain_in, "chain wave arrived early");
      @(negedge clk);
      check(chain_state == {5{chain_in}}, "chain wave did not arrive after five clocks");
      n_wave++;
    end
  end

  // value v = {x[0], ..., x[4]}
  function automatic bit cell_func(input int which, input int v);
    int ones;
    ones = $countones(5'(v));
    case (which)
      0: return ones >= 3;
      1: return ones % 2 == 1;
      2: return v inside {2, 3, 5, 7, 11, 13, 17, 19, 23, 29, 31};
      default: return v % 3 == 0;
    endcase
  endfunction

  initial begin
    repeat (5) @(negedge clk);
    for (int w = 0; w < 4; w++) begin
      for (int k = 0; k < 16; k++) cell_prog[k] = {cell_func(w, 2*k), cell_func(w, 2*k+1)};
      for (int v = 0; v < 32; v++) begin
        cell_eval = 1'b1;
        for (int i = 0; i < 5; i++) cell_x[i] = dr_enc(v[4-i]);
        @(negedge clk);
        check(cell_y == dr_enc(cell_func(w, v)), $sformatf("cell function %0d input %0d", w, v));
        n_cell++;
        cell_x = '0; cell_eval = 1'b0;
        @(negedge clk);
        check(cell_y == '0, "cell not precharged");
      end
    end
  end

  // mechanism counters, observed on the ring
  logic [STAGES-1:0] f_prev = '0, q_prev = '0;
  always @(posedge clk) begin
    for (int k = 0; k < STAGES; k++) begin
      if (top.u_div.f_tok[k].t && !f_prev[k]) n_force++;
      if (qd_valid(top.u_div.q_tok[k]) && !q_prev[k]) begin
        if (top.u_div.q_tok[k].p) n_pos++;
        if (top.u_div.q_tok[k].z) n_zero++;
        if (top.u_div.q_tok[k].n) n_neg++;
      end
      f_prev[k] = top.u_div.f_tok[k].t;
      q_prev[k] = qd_valid(top.u_div.q_tok[k]);
    end
    if (top.u_div.flush && !$past(top.u_div.flush)) n_flush++;
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
    check(n_cell == 128, "cell workloads not completed");
    check(n_wave == 20, "chain waves not completed");
    check(n_tok == 30, "pipeline tokens not all delivered");
    $display("digits +1=%0d 0=%0d -1=%0d force-ahead=%0d early=%0d full=%0d flush=%0d max_cycles=%0d cell_evals=%0d chain_waves=%0d pipe_tokens=%0d",
             n_pos, n_zero, n_neg, n_force, n_early, n_full, n_flush, max_cycles, n_cell, n_wave, n_tok);
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
