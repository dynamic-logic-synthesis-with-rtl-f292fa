// muller_c_tree: N-input Muller C element built from two-input ones.
//
// The output rises once every input is high and falls once every input is
// low; in between it holds. As in the thesis' construction of a wide C
// element, only two-input C elements are used; they are arranged here as a
// balanced binary tree (the thesis draws a chain for three inputs; the tree
// shape is this design's choice, it gives log2(N) element delays instead
// of N-1). Unused leaves of the tree are fed with input 0, which leaves the
// function unchanged. Latency: ceil(log2 N) clocks, zero for N = 1.
module muller_c_tree #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned P      = 1 << LEVELS;  // leaves, power of two

  // Heap numbering: node k has children 2k+1 and 2k+2; leaves are P-1..2P-2.
  logic [2*P-2:0] node;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[P-1+i] = in[i];
    end else begin : g_pad
      assign node[P-1+i] = in[0];
    end
  end

  for (genvar k = 0; k < P - 1; k++) begin : g_node
    muller_c u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (node[2*k+1]),
      .b    (node[2*k+2]),
      .c    (node[k])
    );
  end

  assign out = node[0];

endmodule
