// quotient_gen: radix-2 SRT quotient digit selection with force-ahead.
//
// Input is the three-bit two's complement estimate P = P2 P1 P0 of the
// shifted partial remainder (range -4..3) and the force-ahead flag F of the
// previous stage; output is one digit on three rails q1 (+1), q0 (0) and
// q-1 (-1). The selection follows the thesis' truth table:
//   F = 1                -> -1
//   F = 0, P = 0..3      -> +1
//   F = 0, P = -1        ->  0
//   F = 0, P = -4..-2    -> -1
// The three output columns never overlap, so the thesis folds them into one
// switching tree with three evaluation nodes; its conducting paths are
//   q1  : F' P2'            q0 : F' P2 P1 P0
//   q-1 : F, F' P2 P1', F' P2 P1 P0'
// and exactly one node discharges per evaluation. (The thesis' equations
// write "p > 0" for +1, its tables give p >= 0; the tables are followed.)
// Precharge (eval low) returns all three rails to 0; a digit appears one
// clock after P and F are valid and is held until the next precharge.
module quotient_gen
  import st_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       eval,
  input  dr_t  [2:0] p,
  input  dr_t        f,
  output qd_t        q
);

  logic in_valid;
  qd_t  sel;

  assign in_valid = dr_valid(p[2]) & dr_valid(p[1]) & dr_valid(p[0]) & dr_valid(f);

  // Conducting paths of the merged switching tree.
  always_comb begin
    sel.p = ~f.t & ~p[2].t;
    sel.z = ~f.t &  p[2].t &  p[1].t &  p[0].t;
    sel.n =  f.t | (~f.t & p[2].t & ~p[1].t) | (~f.t & p[2].t & p[1].t & ~p[0].t);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         q <= '0;
    else if (!eval)                     q <= '0;
    else if (!qd_valid(q) && in_valid)  q <= sel;
  end

endmodule
