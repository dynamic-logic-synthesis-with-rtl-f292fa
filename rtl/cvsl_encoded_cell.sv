// cvsl_encoded_cell: semi-custom programmable DCVSL cell ("encoded tree").
//
// Any Boolean function of N variables is a full switching tree of N levels
// whose top-row terminals are wired to the true or complement evaluation
// node according to the truth table. Each top-row circle (a transistor pair
// steered by the last variable x[N-1]) can only see four terminal pairs,
// (0,0), (1,0), (0,1) and (1,1), i.e. the constants 0 and 1, NOT x and x.
// The encoded cell therefore builds those four signals once, with two
// circles of the last variable, and replaces the whole top row by a choice
// among them at each leaf of an (N-1)-level tree. That choice is the cell's
// program: `prog[k]` = {L, R} is the output for x[N-1] = 0 and = 1 at leaf
// k = {x[0], ..., x[N-2]} (x[0] at the root), which is simply the truth
// table entry pair {TT[2k], TT[2k+1]} with the truth table indexed by
// {x[0], ..., x[N-1]}. Transistor count: 2^N - 2 for the reduced tree plus
// four for the two encoding circles, against 2^(N+1) - 2 for the full tree
// (34 against 62 for N = 5).
//
// Behaviour and timing as every DCVSL block here: dual-rail inputs, output
// empty during precharge (eval low), valid one clock after all inputs are
// valid, then held. `prog` is static configuration, not part of the token.
// Structure and counts follow the thesis; the port layout is this design's.
module cvsl_encoded_cell
  import st_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          eval,
  input  dr_t  [N-1:0]                  x,
  input  logic [2**(N-1)-1:0][1:0]      prog,
  output dr_t                           y
);

  logic [N-2:0] leaf;       // path through the (N-1)-level tree
  logic         in_valid;
  logic         value;
  logic [1:0]   lr;
  dr_t  [0:0]   y_w;

  always_comb begin
    in_valid = 1'b1;
    for (int i = 0; i < N; i++) in_valid &= dr_valid(x[i]);
    // x[0] selects at the root, x[N-2] at the last tree level
    for (int i = 0; i < N - 1; i++) leaf[N-2-i] = x[i].t;
    lr = prog[leaf];
    // encoding circles: (0,0)->0, (1,1)->1, (1,0)->NOT x, (0,1)->x
    value = x[N-1].t ? lr[0] : lr[1];
  end

  dcvsl_block #(.NO(1)) u_blk (
    .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(in_valid),
    .value(value), .out(y_w)
  );

  assign y = y_w[0];

endmodule
