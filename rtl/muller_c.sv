// muller_c: two-input Muller C element.
//
// The output copies the inputs when they agree and keeps its previous value
// when they differ (truth table of the thesis' C element: 00->0, 11->1,
// 01/10->hold). The thesis builds it from a static CMOS stack with an
// output inverter. Here every asynchronous element of the divider is
// modelled at the register-transfer level with a unit delay: the element's
// state is a flip-flop sampled on `clk`, which stands for the element's own
// switching delay, so a change at the inputs shows at `c` one clock later.
// INIT sets the state after reset (the thesis does not say how a C element
// is initialised; a reset is this design's choice).
module muller_c #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          c <= INIT;
    else if (a == b)     c <= a;
  end

endmodule
