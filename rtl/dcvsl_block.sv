// dcvsl_block: a dynamic cascode voltage switch logic (DCVSL) function block.
//
// A DCVSL gate has two precharged evaluation nodes per output bit, one for
// the function and one for its complement, and an n-transistor switching
// tree that discharges exactly one of them once its inputs are valid. Seen
// from outside it produces 4-phase dual-rail code by itself:
//   * eval low  (precharge): every output pair returns to empty (0,0);
//   * eval high (evaluate) : once `in_valid` reports that all inputs hold a
//     valid token, each output pair takes the dual-rail code of `value`;
//   * the result is then held, whatever the inputs do, until the next
//     precharge, because a discharged node cannot recharge while evaluating.
// The Boolean function itself (the switching tree) is computed by the
// instantiating module from the true rails of the inputs and given as
// `value`; this block supplies the precharge / evaluate / hold behaviour
// that every function block of the divider shares. Evaluation waits for all
// inputs: a real tree may finish earlier when a subset of inputs decides,
// which only changes timing. Unit-delay model: outputs change one clock
// after the condition that causes them.
module dcvsl_block
  import st_pkg::*;
#(
  parameter int unsigned NO = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            eval,      // 1 = evaluate, 0 = precharge
  input  logic            in_valid,  // all inputs of the tree are valid
  input  logic [NO-1:0]   value,     // tree function of the input true rails
  output dr_t  [NO-1:0]   out
);

  logic out_empty;

  always_comb begin
    out_empty = 1'b1;
    for (int i = 0; i < NO; i++) if (dr_valid(out[i])) out_empty = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else if (!eval) begin
      out <= '0;
    end else if (out_empty && in_valid) begin
      for (int i = 0; i < NO; i++) out[i] <= dr_enc(value[i]);
    end
  end

endmodule
