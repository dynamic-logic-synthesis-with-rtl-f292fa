// flag_gen: force-ahead flag of the quotient selection.
//
// The thesis notes that when the remainder estimate takes its most negative
// value, -4, the next quotient digit must equal the current one (-1), and
// sets a flag F for the next stage: F = 1 if P = -4, i.e. P2 P1 P0 = 100
// in three-bit two's complement. Dual-rail in, dual-rail out, one DCVSL
// gate; evaluates one clock after P is valid.
module flag_gen
  import st_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       eval,
  input  dr_t  [2:0] p,
  output dr_t        f
);

  logic       in_valid;
  dr_t  [0:0] f_w;

  assign in_valid = dr_valid(p[2]) & dr_valid(p[1]) & dr_valid(p[0]);

  dcvsl_block #(.NO(1)) u_blk (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(in_valid),
    .value(p[2].t & ~p[1].t & ~p[0].t), .out(f_w)
  );

  assign f = f_w[0];

endmodule
