// srt_stage: one stage of the self-timed radix-2 SRT division ring.
//
// A stage performs one SRT iteration. Its input token is the shifted
// partial remainder Y = 2R in carry-save form (S, C), the quotient digit q
// chosen by the previous stage and that stage's force-ahead flag F. It
// computes
//   Y' = 2 (Y - q D)          (carry-save, no carry propagation)
//   P  = top three bits of Y' (look-ahead estimate, msb_gen)
//   q' = select(P, F)         (quotient_gen)
//   F' = (P == -4)            (flag_gen)
// and passes (S', C', q', F') on. Structure as in the thesis' stage
// diagram: a divisor multiplexer driven by the previous digit, an n-bit
// carry-save adder of dual-rail full adders, the 3-bit CSA/CPA look-ahead
// group with its multiplexer, the quotient digit selection, a completion
// detector on the stage outputs and the handshake control (stage_ctrl).
//
// Fixed point (this design's choice; the thesis gives no word length): W
// bit two's complement vectors with 3 integer bits, so Y is in [-4, 4).
// -qD is added as NOT D plus a carry-in of one for q = +1; that carry-in
// takes the free least significant slot of the carry vector. After the
// left shift both vectors have a constant 0 in bit 0; it is still sent as a
// dual-rail pair so that it empties and fills with the rest of the token.
// Bit W-1 of the input vectors is shifted out and never read.
// The divisor `d` is a static single-rail word already aligned to this
// format. Handshake: `in_done` is the predecessor's completion (its request,
// active high here), `succ_done` the successor's; `done` is this stage's
// completion detector output.
module srt_stage
  import st_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter bit          USE_C = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  d,
  // token in
  input  dr_t  [W-1:0]  s_in,
  input  dr_t  [W-1:0]  c_in,
  input  qd_t           q_in,
  input  dr_t           f_in,
  input  logic          in_done,
  // token out
  output dr_t  [W-1:0]  s_out,
  output dr_t  [W-1:0]  c_out,
  output qd_t           q_out,
  output dr_t           f_out,
  input  logic          succ_done,
  output logic          done,
  output logic          eval
);

  if (W < 6) begin : g_bad_width
    $error("srt_stage: W must be at least 6");
  end

  dr_t [W-1:0] a;        // selected divisor multiple (bit W-1 unused)
  dr_t [W-2:0] csa_s;    // carry-save sums
  dr_t [W-2:0] csa_c;    // carry-save carries (index j = carry out of bit j)
  dr_t [2:0]   est;      // look-ahead estimate P
  dr_t [2:0]   lsb;      // {carry-in, constant-0 sum LSB, constant-0 carry LSB}

  stage_ctrl #(.USE_C(USE_C)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .req_in (~in_done),
    .ack_out(~succ_done),
    .eval   (eval)
  );

  divisor_mux #(.W(W)) u_mux (
    .clk(clk), .rst_n(rst_n), .eval(eval), .q(q_in), .d(d), .a(a)
  );

  // Full adders on bits 0..W-2; bit W-1 is shifted out and not built.
  for (genvar j = 0; j < W - 1; j++) begin : g_fa
    dr_full_adder u_fa (
      .clk(clk), .rst_n(rst_n), .eval(eval),
      .a(s_in[j]), .b(c_in[j]), .cin(a[j]),
      .sum(csa_s[j]), .cout(csa_c[j])
    );
  end

  // Carry-in for q = +1 and the two constant-zero LSBs, precharged with the
  // rest of the stage.
  dcvsl_block #(.NO(3)) u_lsb (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(qd_valid(q_in)),
    .value({q_in.p, 1'b0, 1'b0}), .out(lsb)
  );

  // Shift left by one.
  assign s_out = {csa_s[W-2:0], lsb[1]};
  assign c_out = {csa_c[W-3:0], lsb[2], lsb[0]};

  msb_gen u_msb (
    .clk(clk), .rst_n(rst_n), .eval(eval),
    .s(s_in[W-2:W-5]), .c(c_in[W-2:W-5]), .d(d[W-2:W-5]), .q(q_in),
    .p(est)
  );

  quotient_gen u_qsel (
    .clk(clk), .rst_n(rst_n), .eval(eval), .p(est), .f(f_in), .q(q_out)
  );

  flag_gen u_flag (
    .clk(clk), .rst_n(rst_n), .eval(eval), .p(est), .f(f_out)
  );

  // Completion detector over the whole output token; the digit counts as
  // one pair (valid when any of its rails is high).
  dr_t [2*W+1:0] tok;
  assign tok = {s_out, c_out, f_out, dr_t'{t: q_out.p | q_out.n, f: q_out.z}};

  completion_detector #(.N(2*W+2)) u_det (
    .clk(clk), .rst_n(rst_n), .d(tok), .done(done)
  );

endmodule
