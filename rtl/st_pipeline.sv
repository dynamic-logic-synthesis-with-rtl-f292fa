// st_pipeline: linear self-timed pipeline of DCVSL stages (PC0 or PS0).
//
// STAGES identical stages in a row, without latches between them. Each
// stage is a DCVSL function block F, a completion detector D on its
// outputs and a stage controller (stage_ctrl). F evaluates when its
// successor is empty and its predecessor holds data, and precharges when
// its successor holds data and its predecessor is empty, so data waves and
// empty waves alternate down the pipeline by themselves. With USE_C = 0
// the controller's C element is a wire (PS0).
//
// Here F is a dual-rail buffer of WIDTH bits, so the pipeline moves tokens
// unchanged; a real application puts its logic in `value` of the
// dcvsl_block. The point of this block is the handshake and its timing.
//
// Interface (4-phase dual-rail on both sides):
//   in_data / in_req : the producer puts a valid word on in_data and drops
//                      in_req (0 = "my output is valid"); it returns the
//                      word to empty and raises in_req when in_ack says the
//                      first stage has taken it.
//   in_ack           : 0 once stage 0 has evaluated, 1 once it is reset.
//   out_data/out_req : last stage's word and its request (0 = valid).
//   out_ack          : from the consumer, 1 while it is ready (empty).
// Timing: unit-delay model (see muller_c). With every element delay equal
// to one clock, the cycle time of a stage is 3 tF(up) + tF(down) + 4 tC +
// 4 tD for PC0 and 3 tF(up) + tF(down) + 2 tD for PS0 (thesis, cycle-time
// formulas of its PC/PS comparison), tD = ceil(log2 WIDTH).
//
// The stage structure (Fig. 2.16/2.17 of the thesis for PC0, its PS0
// variant) follows the thesis; STAGES = 3 is the pipeline it draws. The
// port conventions at both ends and the buffer function are this design's.
module st_pipeline
  import st_pkg::*;
#(
  parameter int unsigned STAGES = 3,
  parameter int unsigned WIDTH  = 2,
  parameter bit          USE_C  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dr_t  [WIDTH-1:0]  in_data,
  input  logic              in_req,
  output logic              in_ack,
  output dr_t  [WIDTH-1:0]  out_data,
  output logic              out_req,
  input  logic              out_ack
);

  dr_t  [WIDTH-1:0] data [STAGES+1];  // data[0] = in_data, data[k+1] = stage k
  logic [STAGES+1:0] done;            // done[0] = producer, done[k+1] = stage k

  assign data[0] = in_data;
  assign done[0] = ~in_req;
  assign done[STAGES+1] = ~out_ack;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic             eval;
    logic [WIDTH-1:0] value;
    logic             in_valid;

    always_comb begin
      in_valid = 1'b1;
      for (int j = 0; j < WIDTH; j++) begin
        value[j] = data[k][j].t;
        in_valid = in_valid & dr_valid(data[k][j]);
      end
    end

    stage_ctrl #(.USE_C(USE_C)) u_ctrl (
      .clk(clk), .rst_n(rst_n), .req_in(~done[k]), .ack_out(~done[k+2]), .eval(eval)
    );

    dcvsl_block #(.NO(WIDTH)) u_f (
      .clk(clk), .rst_n(rst_n), .eval(eval), .in_valid(in_valid), .value(value),
      .out(data[k+1])
    );

    completion_detector #(.N(WIDTH)) u_d (
      .clk(clk), .rst_n(rst_n), .d(data[k+1]), .done(done[k+1])
    );
  end

  assign in_ack   = ~done[1];
  assign out_data = data[STAGES];
  assign out_req  = ~done[STAGES];

endmodule
