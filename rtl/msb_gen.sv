// msb_gen: look-ahead estimate of the next partial remainder's top bits.
//
// The quotient selection of a stage needs the three most significant bits
// of the new remainder, but the full carry-save adder can only start once
// the previous stage's digit q has chosen the divisor multiple. As in the
// thesis, this block computes the estimate for all three possible digits
// in advance from the previous remainder alone (a small carry-save adder and
// a three-bit carry-propagate adder per candidate) and a multiplexer picks
// one as soon as q arrives.
//
// Arithmetic (this design's fixed-point format, see srt_stage): the new
// remainder is Y' = 2(S + C - qD) in carry-save form, so its top three sum
// bits are the CSA sums at positions W-2..W-4 of the inputs and its top
// three carry bits the CSA carries out of positions W-3..W-5. The estimate
// is P = (top3(sum) + top3(carry)) mod 8, which is never above the true
// value and at most two units below it. Inputs are bits W-5..W-2 of the
// remainder pair and of the divisor; the divisor is static single-rail.
// Timing: candidates one clock after S and C are valid, P one clock after
// q and the candidates are valid.
module msb_gen
  import st_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       eval,
  input  dr_t  [3:0] s,   // remainder sum bits W-2..W-5
  input  dr_t  [3:0] c,   // remainder carry bits W-2..W-5
  input  logic [3:0] d,   // divisor bits W-2..W-5
  input  qd_t        q,   // previous quotient digit
  output dr_t  [2:0] p    // estimate P2 P1 P0
);

  // Candidate estimate for the divisor multiple chosen by digit v.
  function automatic logic [2:0] estimate(input logic [3:0] sv, input logic [3:0] cv,
                                          input logic [3:0] dv, input int v);
    logic [3:0] av;
    logic [2:0] ssum, scar;
    av = (v > 0) ? ~dv : ((v < 0) ? dv : 4'b0000);
    // sums at input positions 3..1 (W-2..W-4), carries out of positions 2..0
    for (int j = 0; j < 3; j++) begin
      ssum[j] = sv[j+1] ^ cv[j+1] ^ av[j+1];
      scar[j] = (sv[j] & cv[j]) | (sv[j] & av[j]) | (cv[j] & av[j]);
    end
    return ssum + scar;
  endfunction

  logic       sc_valid;
  dr_t  [2:0] cand_p, cand_z, cand_n;
  logic [2:0] sel_value;
  logic       sel_valid;
  logic [3:0] s_t, c_t;

  always_comb begin
    sc_valid = 1'b1;
    for (int j = 0; j < 4; j++) begin
      sc_valid = sc_valid & dr_valid(s[j]) & dr_valid(c[j]);
      s_t[j] = s[j].t;
      c_t[j] = c[j].t;
    end
  end

  dcvsl_block #(.NO(3)) u_cand_p (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(sc_valid),
    .value(estimate(s_t, c_t, d, 1)), .out(cand_p)
  );
  dcvsl_block #(.NO(3)) u_cand_z (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(sc_valid),
    .value(estimate(s_t, c_t, d, 0)), .out(cand_z)
  );
  dcvsl_block #(.NO(3)) u_cand_n (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(sc_valid),
    .value(estimate(s_t, c_t, d, -1)), .out(cand_n)
  );

  // Multiplexer controlled by the previous digit.
  always_comb begin
    sel_valid = 1'b0;
    sel_value = '0;
    for (int j = 0; j < 3; j++) begin
      sel_value[j] = (q.p & cand_p[j].t) | (q.z & cand_z[j].t) | (q.n & cand_n[j].t);
    end
    if (q.p)      sel_valid = dr_valid(cand_p[0]);
    else if (q.z) sel_valid = dr_valid(cand_z[0]);
    else if (q.n) sel_valid = dr_valid(cand_n[0]);
  end

  dcvsl_block #(.NO(3)) u_sel (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(sel_valid),
    .value(sel_value), .out(p)
  );

endmodule
