// quotient_shift_reg: quotient digit register attached to one ring stage.
//
// Each pass of the token through a stage produces one quotient digit; the
// stage's register shifts it in, so after L passes the register holds that
// stage's L digits, the newest in entry 0 and the first one in entry L-1.
// A digit is held as a positive / negative bit pair (+1 = 10, -1 = 01,
// 0 = 00), the same split the thesis uses to turn a signed-digit quotient
// into positive and negative parts. The thesis builds these registers from
// C elements and NOR gates clocked by the stage's own handshake; here the
// shift happens on the clock after the digit rails go from empty to valid
// (one shift per token), which is this design's choice. `clear` empties the
// register and its count before a division.
module quotient_shift_reg
  import st_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      enable,
  input  qd_t                       q,
  output logic [DEPTH-1:0]          pos,
  output logic [DEPTH-1:0]          neg,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  logic was_valid;
  logic shift;

  assign shift = enable & qd_valid(q) & ~was_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      was_valid <= 1'b0;
      pos       <= '0;
      neg       <= '0;
      count     <= '0;
    end else begin
      was_valid <= qd_valid(q);
      if (clear) begin
        pos   <= '0;
        neg   <= '0;
        count <= '0;
      end else if (shift) begin
        pos <= {pos[DEPTH-2:0], q.p};
        neg <= {neg[DEPTH-2:0], q.n};
        if (count != DEPTH[$clog2(DEPTH+1)-1:0]) count <= count + 1'b1;
      end
    end
  end

endmodule
