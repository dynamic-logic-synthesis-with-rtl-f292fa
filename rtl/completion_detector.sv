// completion_detector: completion signal of a dual-rail word.
//
// Each dual-rail pair is ORed, which is high once that bit holds a valid
// value (either rail high) and low while it is the empty spacer. For a one
// bit word the OR is the whole detector; for wider words the OR outputs
// meet in a Muller C element tree, so `done` rises when every bit is valid
// and falls only when every bit has returned to empty. Both follow the
// thesis (OR gate for one output, C elements for several). Latency from the
// last bit to change: ceil(log2 N) clocks of the unit-delay model.
module completion_detector
  import st_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dr_t  [N-1:0]   d,
  output logic           done
);

  logic [N-1:0] bit_valid;

  always_comb begin
    for (int i = 0; i < N; i++) bit_valid[i] = dr_valid(d[i]);
  end

  muller_c_tree #(.N(N)) u_tree (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (bit_valid),
    .out  (done)
  );

endmodule
