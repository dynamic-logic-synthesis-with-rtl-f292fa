// dr_full_adder: full adder in dual-rail DCVSL, one carry-save adder cell.
//
// Two DCVSL gates share the inputs a, b and cin (three dual-rail pairs) and
// produce sum and carry (two dual-rail pairs). Their functions are the sum
// and carry columns of the full adder truth table, indexed by {a,b,cin}:
//   sum   column 0,1,1,0,1,0,0,1  (rows abc = 000 .. 111)
//   carry column 0,0,0,1,0,1,1,1
// The thesis synthesises the sum tree as a merged switching tree of seven
// nodes with variable order a, b, c; functionally that tree is the sum
// column, which is what is modelled here. Both outputs precharge while
// `eval` is low and evaluate one clock after all three inputs are valid.
module dr_full_adder
  import st_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic eval,
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  cin,
  output dr_t  sum,
  output dr_t  cout
);

  // Truth table columns, bit index = {a,b,cin}.
  localparam logic [7:0] SUM_TT   = 8'b1001_0110;
  localparam logic [7:0] CARRY_TT = 8'b1110_1000;

  logic [2:0] idx;
  logic       in_valid;
  dr_t  [0:0] sum_w, cout_w;

  assign idx      = {a.t, b.t, cin.t};
  assign in_valid = dr_valid(a) & dr_valid(b) & dr_valid(cin);

  dcvsl_block #(.NO(1)) u_sum (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(in_valid),
    .value(SUM_TT[idx]), .out(sum_w)
  );

  dcvsl_block #(.NO(1)) u_carry (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(in_valid),
    .value(CARRY_TT[idx]), .out(cout_w)
  );

  assign sum  = sum_w[0];
  assign cout = cout_w[0];

endmodule
