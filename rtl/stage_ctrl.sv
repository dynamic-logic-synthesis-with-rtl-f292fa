// stage_ctrl: handshake control of one self-timed pipeline stage.
//
// The stage's function block F evaluates while `eval` is high and
// precharges while it is low. Signal names follow the thesis' PC0 stage:
//   req_in  - request from the predecessor: 0 once the predecessor's
//             completion detector has seen valid data, 1 once it is empty;
//   ack_out - acknowledge from the successor: 1 while the successor is
//             empty (ready), 0 once it has evaluated.
// PC0 (USE_C = 1): a Muller C element with inputs ack_out and NOT req_in.
//   ack_out = 1 and req_in = 0 start evaluation; ack_out = 0 and req_in = 1
//   start precharge; otherwise the stage keeps its phase.
// PS0 (USE_C = 0): the C element is replaced by a wire from the successor's
//   acknowledge; the valid/empty state of the input data alone keeps the
//   block from evaluating early. This is only safe under the thesis' timing
//   assumption that a predecessor resets faster than its successor
//   evaluates.
// PC0 is the default (the thesis does not say which configuration the
// divider uses; PC0 is the one that needs no timing assumption).
module stage_ctrl #(
  parameter bit USE_C = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_in,
  input  logic ack_out,
  output logic eval
);

  if (USE_C) begin : g_pc0
    muller_c u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (ack_out),
      .b    (~req_in),
      .c    (eval)
    );
  end else begin : g_ps0
    assign eval = ack_out;
  end

endmodule
