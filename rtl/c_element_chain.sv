// c_element_chain: the C-element wave propagation circuit.
//
// N Muller C elements in a row. Each element sees its predecessor's state
// directly and its successor's state through an inverter, so it copies the
// predecessor whenever predecessor and successor differ and holds
// otherwise. A change at the input therefore travels, wave-like, along the
// chain, one element per element delay, and a wave can only enter an
// element once the wave before it has moved on. This is the control skeleton
// of every self-timed pipeline in this design: the stage controllers of the
// divider ring are the same C elements with the data path hung on them.
//
// Interface: `in` is the state of the element in front of the chain,
// `sink` the state of the element behind it (tie it to `state[N-1]` for a
// free-flowing end, or hold it to block the end). `state[i]` is element i.
// Timing: unit-delay model, one clk per element (see muller_c); all
// elements reset to 0.
//
// The structure (five C elements with inverters, cascaded) is the thesis'
// demonstration circuit; the boundary ports are this design's.
module c_element_chain #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in,
  input  logic         sink,
  output logic [N-1:0] state
);

  logic [N+1:0] node;  // node[0] = in, node[i+1] = state[i], node[N+1] = sink

  assign node[0]   = in;
  assign node[N+1] = sink;

  for (genvar i = 0; i < N; i++) begin : g_c
    muller_c #(.INIT(1'b0)) u_c (
      .clk(clk), .rst_n(rst_n), .a(node[i]), .b(~node[i+2]), .c(node[i+1])
    );
  end

  assign state = node[N:1];

endmodule
