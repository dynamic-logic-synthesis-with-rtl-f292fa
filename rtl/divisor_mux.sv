// divisor_mux: selects the divisor multiple -q*D added to the remainder.
//
// The SRT step R' = 2R - qD needs -D, 0 or +D depending on the previous
// quotient digit q. As in the thesis the multiple is chosen by a
// multiplexer controlled by that digit. In two's complement -D is the
// bitwise complement of D plus one; the plus one is not added here but
// enters the carry-save adder as its free carry-in (the q = +1 rail), so
// each output bit is:
//   q = +1 : NOT D[j]      q = 0 : 0      q = -1 : D[j]
// The divisor is a static single-rail word, held stable for the whole
// division; only q carries the token, so each bit evaluates one clock after
// q becomes valid and precharges with `eval` low.
module divisor_mux
  import st_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eval,
  input  qd_t           q,
  input  logic [W-1:0]  d,
  output dr_t  [W-1:0]  a
);

  logic [W-1:0] value;

  always_comb begin
    for (int j = 0; j < W; j++) value[j] = (q.p & ~d[j]) | (q.n & d[j]);
  end

  dcvsl_block #(.NO(W)) u_blk (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(qd_valid(q)),
    .value(value), .out(a)
  );

endmodule
