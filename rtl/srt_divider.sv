// srt_divider: self-timed radix-2 SRT divider built as a ring of dynamic
// logic stages (top level).
//
// Idea: SRT division produces one quotient digit in {-1, 0, +1} per step
// from a three-bit estimate of the partial remainder kept in carry-save
// form, so no step waits for a carry chain. Identical steps are built as
// STAGES self-timed stages of dual-rail dynamic (DCVSL) logic closed into a
// ring; one data token circulates LOOPS times and every stage hands it on
// as soon as it has finished, with no clock deciding when. Each stage has a
// quotient register collecting the digits it produces, and a remainder
// register with a comparator stops the ring early when the token returns
// unchanged after a loop (all later digits would repeat).
//
// Numbers: dividend X and divisor D are normalised to [1, 2) with FRAC_BITS
// fraction bits (bit FRAC_BITS is the leading one). The quotient digits
// q_0 .. q_{n-1}, n = STAGES * LOOPS, satisfy
//   X / D = sum_k q_k 2^-k + Y / (2^(n-1) D),   |Y| <= 2D,
// q_0 being the integer digit. They are returned split into a positive and
// a negative part, digit k at bit n-1-k, so the quotient is
//   Q = (q_pos - q_neg) / 2^(n-1).
// rem_s + rem_c (mod 2^W, two's complement, FRAC_BITS+1 fraction bits) is
// the shifted remainder the last digit was selected from, so Y above is
// that value minus q_{n-1} D.
//
// Divisor range: the digit rule looks at three remainder bits and no
// divisor bits. With the carry-save remainder this is exact for divisors
// below 1.625 (checked by simulation over that range); for divisors close
// to 2 the remainder can settle near -2D, its three-bit estimate wraps
// round and the quotient is wrong. The rule is kept as the thesis gives it.
//
// Interface (single-rail, sampled on clk): with `busy` low, a one-clock
// `start` latches dividend and divisor; they need not be held afterwards.
// `done` rises when the digits are ready and stays high until the next
// start; `early` tells that the ring stopped before LOOPS loops because a
// loop left the token unchanged (the digits are then completed by
// repetition). Internally every asynchronous element is modelled with a
// unit delay on clk (see muller_c); the time a division takes depends on
// the data path of each stage, not on a fixed count.
//
// From the thesis: five stages in a ring, per-stage quotient registers,
// remainder register and compare block for early termination, the stage
// structure and digit selection. This design's own choices: the word
// length (FRAC_BITS = 12), the loop count, PC0 stage control, how the token
// is injected (a dual-rail merge in front of stage 0) and removed (the
// feedback path is closed after the last loop, leaving the final token
// parked at the last stage), the digit counting, and flushing the parked
// token when a new division starts.
module srt_divider
  import st_pkg::*;
#(
  parameter int unsigned FRAC_BITS = 12,
  parameter int unsigned STAGES    = 5,
  parameter int unsigned LOOPS     = 3,
  parameter bit          USE_C     = 1'b1,
  localparam int unsigned W        = FRAC_BITS + 4,
  localparam int unsigned NDIG     = STAGES * LOOPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [FRAC_BITS:0]   dividend,
  input  logic [FRAC_BITS:0]   divisor,
  output logic                 busy,
  output logic                 done,
  output logic                 early,
  output logic [NDIG-1:0]      q_pos,
  output logic [NDIG-1:0]      q_neg,
  output logic [W-1:0]         rem_s,
  output logic [W-1:0]         rem_c
);

  localparam int unsigned TW = 2 * W + 4;  // single-rail token width
  localparam int unsigned LW = $clog2(LOOPS + 1);

  typedef enum logic [2:0] {S_IDLE, S_FLUSH, S_INJECT, S_RUN, S_DONE} state_t;
  state_t state;

  logic [W-1:0]     d_al;      // divisor aligned to the remainder format
  logic [W-1:0]     x_al;      // dividend / 2 in the remainder format
  logic             clear;
  logic             flush;
  logic             inj_valid;

  // ---------------------------------------------------------------- ring
  dr_t  [W-1:0] s_tok [STAGES];
  dr_t  [W-1:0] c_tok [STAGES];
  qd_t          q_tok [STAGES];
  dr_t          f_tok [STAGES];
  logic [STAGES-1:0] st_done;

  // stage 0 input: merge of the injected token and the feedback path
  dr_t  [W-1:0] s_m, c_m, s_inj, c_inj, s_fb, c_fb;
  qd_t          q_m, q_inj, q_fb;
  dr_t          f_m, f_inj, f_fb;
  logic         m_done;
  logic         fb_open;

  always_comb begin
    for (int j = 0; j < W; j++) begin
      s_inj[j] = inj_valid ? dr_enc(x_al[j]) : DR_EMPTY;
      c_inj[j] = inj_valid ? dr_enc(1'b0)    : DR_EMPTY;
      s_fb[j]  = fb_open ? s_tok[STAGES-1][j] : DR_EMPTY;
      c_fb[j]  = fb_open ? c_tok[STAGES-1][j] : DR_EMPTY;
    end
    q_inj = inj_valid ? qd_t'{p: 1'b0, z: 1'b1, n: 1'b0} : qd_t'('0);
    f_inj = inj_valid ? dr_enc(1'b0) : DR_EMPTY;
    q_fb  = fb_open ? q_tok[STAGES-1] : qd_t'('0);
    f_fb  = fb_open ? f_tok[STAGES-1] : DR_EMPTY;
    // dual-rail merge: at most one side is non-empty at a time
    s_m = s_inj | s_fb;
    c_m = c_inj | c_fb;
    q_m = q_inj | q_fb;
    f_m = f_inj | f_fb;
  end

  dr_t [2*W+1:0] m_word;
  assign m_word = {s_m, c_m, f_m, dr_t'{t: q_m.p | q_m.n, f: q_m.z}};

  completion_detector #(.N(2*W+2)) u_merge_det (
    .clk(clk), .rst_n(rst_n), .d(m_word), .done(m_done)
  );

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic succ;
    if (k == STAGES - 1) begin : g_last
      assign succ = st_done[0] | flush;
    end else begin : g_mid
      assign succ = st_done[k+1];
    end

    if (k == 0) begin : g_first
      srt_stage #(.W(W), .USE_C(USE_C)) u_stage (
        .clk(clk), .rst_n(rst_n), .d(d_al),
        .s_in(s_m), .c_in(c_m), .q_in(q_m), .f_in(f_m), .in_done(m_done),
        .s_out(s_tok[k]), .c_out(c_tok[k]), .q_out(q_tok[k]), .f_out(f_tok[k]),
        .succ_done(succ), .done(st_done[k]), .eval()
      );
    end else begin : g_next
      srt_stage #(.W(W), .USE_C(USE_C)) u_stage (
        .clk(clk), .rst_n(rst_n), .d(d_al),
        .s_in(s_tok[k-1]), .c_in(c_tok[k-1]), .q_in(q_tok[k-1]), .f_in(f_tok[k-1]),
        .in_done(st_done[k-1]),
        .s_out(s_tok[k]), .c_out(c_tok[k]), .q_out(q_tok[k]), .f_out(f_tok[k]),
        .succ_done(succ), .done(st_done[k]), .eval()
      );
    end
  end

  // ------------------------------------------------ quotient registers
  logic [LOOPS-1:0] sr_pos [STAGES];
  logic [LOOPS-1:0] sr_neg [STAGES];
  logic             sr_en;

  assign sr_en = (state == S_INJECT) || (state == S_RUN);

  for (genvar k = 0; k < STAGES; k++) begin : g_qreg
    quotient_shift_reg #(.DEPTH(LOOPS)) u_qreg (
      .clk(clk), .rst_n(rst_n), .clear(clear), .enable(sr_en),
      .q(q_tok[k]), .pos(sr_pos[k]), .neg(sr_neg[k]), .count()
    );
  end

  // ------------------------------------- remainder register and compare
  logic [TW-1:0] tok_last, tok_cur;
  logic          tok_equal;
  logic          done_last_q, rise_last, fall_last;
  logic [LW-1:0] loops;       // loops completed
  logic          more;        // decision taken when the token arrived

  always_comb begin
    for (int j = 0; j < W; j++) begin
      tok_cur[TW-1-j]     = s_tok[STAGES-1][W-1-j].t;
      tok_cur[TW-1-W-j]   = c_tok[STAGES-1][W-1-j].t;
    end
    tok_cur[3:0] = {q_tok[STAGES-1].p, q_tok[STAGES-1].z, q_tok[STAGES-1].n,
                    f_tok[STAGES-1].t};
  end

  assign rise_last = st_done[STAGES-1] & ~done_last_q;
  assign fall_last = ~st_done[STAGES-1] & done_last_q;

  remainder_compare #(.TW(TW)) u_cmp (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .capture(rise_last && state == S_RUN),
    .advance(fall_last && state == S_RUN),
    .cur(tok_cur), .last(tok_last), .equal(tok_equal)
  );

  assign fb_open = (state == S_RUN) && st_done[STAGES-1] && done_last_q && more;

  // ------------------------------------------------------- controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      d_al        <= '0;
      x_al        <= '0;
      inj_valid   <= 1'b0;
      done_last_q <= 1'b0;
      loops       <= '0;
      more        <= 1'b0;
      early       <= 1'b0;
    end else begin
      done_last_q <= st_done[STAGES-1];
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            d_al  <= W'({divisor, 1'b0});
            x_al  <= W'(dividend);
            loops <= '0;
            more  <= 1'b0;
            early <= 1'b0;
            state <= st_done[STAGES-1] ? S_FLUSH : S_INJECT;
          end
        end
        S_FLUSH: begin
          if (!st_done[STAGES-1] && !done_last_q) state <= S_INJECT;
        end
        S_INJECT: begin
          inj_valid <= 1'b1;
          if (inj_valid && st_done[0]) begin
            inj_valid <= 1'b0;
            state     <= S_RUN;
          end
        end
        S_RUN: begin
          if (rise_last) begin
            more  <= (32'(loops) + 1 < LOOPS) && !tok_equal;
            early <= (32'(loops) + 1 < LOOPS) && tok_equal;
          end
          if (fall_last) loops <= loops + 1'b1;
          if (st_done[STAGES-1] && done_last_q && !more) begin
            loops <= loops + 1'b1;
            state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign clear = (state == S_IDLE || state == S_DONE) && start;
  assign flush = (state == S_FLUSH);
  assign busy  = (state != S_IDLE) && (state != S_DONE);
  assign done  = (state == S_DONE);

  // --------------------------------------------------- digit assembly
  // Digit k comes from stage k mod STAGES in loop k / STAGES; loops that
  // were skipped by early termination repeat the last loop computed.
  always_comb begin
    int unsigned l, st, m, e;
    q_pos = '0;
    q_neg = '0;
    m = 32'(loops);
    for (int unsigned k = 0; k < NDIG; k++) begin
      l  = k / STAGES;
      st = k % STAGES;
      e  = (l < m) ? (m - 1 - l) : 0;
      if (m != 0) begin
        q_pos[NDIG-1-k] = sr_pos[st][e];
        q_neg[NDIG-1-k] = sr_neg[st][e];
      end
    end
  end

  assign rem_s = tok_last[TW-1 -: W];
  assign rem_c = tok_last[TW-1-W -: W];

endmodule
