// dynamic_logic_top: the two pieces of hardware of this design, side by
// side.
//
//  * srt_divider: the self-timed radix-2 SRT divider, a ring of five
//    dual-rail dynamic logic stages (see srt_divider for the interface and
//    number format). Its ports are brought out with the prefix-free names
//    of the divider.
//  * cvsl_encoded_cell: one five-input semi-custom programmable DCVSL cell
//    (the "encoded tree"), an independent function block with its own
//    precharge control, dual-rail inputs and truth-table program. Its ports
//    carry the prefix cell_.
//  * c_element_chain: the five-element C-element wave chain that
//    demonstrates how a self-timed pipeline's control propagates a wave.
//    Its ports carry the prefix chain_.
//  * st_pipeline: a three-stage linear PC0 pipeline of DCVSL buffer
//    stages with 4-phase dual-rail ports at both ends (prefix pipe_).
// The four share only clock and reset; nothing connects them, because
// they are independent examples of the same self-timed, dynamic logic style.
module dynamic_logic_top
  import st_pkg::*;
#(
  parameter int unsigned FRAC_BITS = 12,
  parameter int unsigned LOOPS     = 3,
  parameter int unsigned CELL_N    = 5,
  parameter int unsigned CHAIN_N   = 5,
  parameter int unsigned PIPE_N    = 3,
  parameter int unsigned PIPE_W    = 2,
  localparam int unsigned W        = FRAC_BITS + 4,
  localparam int unsigned NDIG     = 5 * LOOPS
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // divider
  input  logic                            start,
  input  logic [FRAC_BITS:0]              dividend,
  input  logic [FRAC_BITS:0]              divisor,
  output logic                            busy,
  output logic                            done,
  output logic                            early,
  output logic [NDIG-1:0]                 q_pos,
  output logic [NDIG-1:0]                 q_neg,
  output logic [W-1:0]                    rem_s,
  output logic [W-1:0]                    rem_c,
  // programmable cell
  input  logic                            cell_eval,
  input  dr_t  [CELL_N-1:0]               cell_x,
  input  logic [2**(CELL_N-1)-1:0][1:0]   cell_prog,
  output dr_t                             cell_y,
  // C-element wave chain
  input  logic                            chain_in,
  input  logic                            chain_sink,
  output logic [CHAIN_N-1:0]              chain_state,
  // linear self-timed pipeline
  input  dr_t  [PIPE_W-1:0]               pipe_in_data,
  input  logic                            pipe_in_req,
  output logic                            pipe_in_ack,
  output dr_t  [PIPE_W-1:0]               pipe_out_data,
  output logic                            pipe_out_req,
  input  logic                            pipe_out_ack
);

  srt_divider #(.FRAC_BITS(FRAC_BITS), .STAGES(5), .LOOPS(LOOPS)) u_div (
    .clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend), .divisor(divisor),
    .busy(busy), .done(done), .early(early), .q_pos(q_pos), .q_neg(q_neg),
    .rem_s(rem_s), .rem_c(rem_c)
  );

  cvsl_encoded_cell #(.N(CELL_N)) u_cell (
    .clk(clk), .rst_n(rst_n), .eval(cell_eval), .x(cell_x), .prog(cell_prog), .y(cell_y)
  );

  c_element_chain #(.N(CHAIN_N)) u_chain (
    .clk(clk), .rst_n(rst_n), .in(chain_in), .sink(chain_sink), .state(chain_state)
  );

  st_pipeline #(.STAGES(PIPE_N), .WIDTH(PIPE_W), .USE_C(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_data(pipe_in_data), .in_req(pipe_in_req),
    .in_ack(pipe_in_ack), .out_data(pipe_out_data), .out_req(pipe_out_req),
    .out_ack(pipe_out_ack)
  );

endmodule
