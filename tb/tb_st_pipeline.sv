// tb_st_pipeline: handshake and cycle time of the linear self-timed
// pipeline, PC0 against PS0.
//
// Four pipelines run side by side: PC0 and PS0, each with one-bit and
// two-bit words (3 stages). Each is fed by an ideal producer (it offers the
// next token as soon as the first stage is reset and withdraws it as soon
// as that stage has evaluated) and drained by an ideal consumer (its
// acknowledge follows the last stage at once), so the stages themselves
// set the pace. The testbench checks
//   * that every token comes out once, unchanged and in order;
//   * the steady-state cycle time, i.e. clocks between successive output
//     tokens, against the thesis' cycle-time coefficients for the two
//     configurations with every element delay one clock:
//       PC0: 3 tF(up) + tF(down) + 4 tC + 4 tD,  PS0: 3 tF(up) + tF(down) + 2 tD,
//     tF = tC = 1 and tD = ceil(log2 WIDTH) (the OR of the detector is
//     free, each C-element level costs one clock): 8 / 12 for PC0 and
//     4 / 6 for PS0 at one / two bits;
//   * that PS0 is faster than PC0.
// A watchdog ends the run if a handshake hangs.
module tb_st_pipeline;
  import st_pkg::*;

  localparam int unsigned NTOK = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int period [4];

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  for (genvar g = 0; g < 4; g++) begin : g_pipe
    localparam bit          PS    = (g >= 2);
    localparam int unsigned WIDTH = (g % 2 == 0) ? 1 : 2;
    localparam int unsigned TD    = (WIDTH == 1) ? 0 : 1;
    localparam int unsigned EXPECT = PS ? (3 + 1 + 2 * TD) : (3 + 1 + 4 + 4 * TD);

    dr_t [WIDTH-1:0] in_data, out_data;
    logic in_req, in_ack, out_req;
    int sent = 0, got = 0;
    int last_t = -1, cyc = 0;
    logic ack_q = 1'b1, req_q = 1'b1;
    logic [WIDTH-1:0] tok;

    st_pipeline #(.STAGES(3), .WIDTH(WIDTH), .USE_C(!PS)) dut (
      .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_req(in_req), .in_ack(in_ack),
      .out_data(out_data), .out_req(out_req), .out_ack(out_req)
    );

    // token i carries i * 3 + 1 (mod 2^WIDTH), so neighbours differ
    assign tok = WIDTH'(sent * 3 + 1);

    // ideal producer
    always_comb begin
      for (int j = 0; j < WIDTH; j++)
        in_data[j] = (rst_n && in_ack && sent < NTOK) ? dr_enc(tok[j]) : DR_EMPTY;
      in_req = !(rst_n && in_ack && sent < NTOK);
    end

    always @(posedge clk) begin
      cyc++;
      ack_q <= in_ack;
      req_q <= out_req;
      if (rst_n && ack_q && !in_ack) sent++;
      if (rst_n && req_q && !out_req) begin
        logic [WIDTH-1:0] v, want;
        for (int j = 0; j < WIDTH; j++) v[j] = out_data[j].t;
        want = WIDTH'(got * 3 + 1);
        check(v == want, $sformatf("pipe %0d token %0d value %0h, expected %0h", g, got, v, want));
        if (got >= 10 && last_t >= 0)
          check(cyc - last_t == EXPECT,
                $sformatf("pipe %0d token %0d period %0d, expected %0d", g, got, cyc - last_t, EXPECT));
        if (got >= 10) period[g] = cyc - last_t;
        last_t = cyc;
        got++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (g_pipe[0].got == NTOK && g_pipe[1].got == NTOK &&
          g_pipe[2].got == NTOK && g_pipe[3].got == NTOK);
    repeat (20) @(negedge clk);
    for (int g = 0; g < 4; g++) $display("pipe %0d (%s, %0d bit): period %0d clk", g,
                                         g >= 2 ? "PS0" : "PC0", (g % 2) + 1, period[g]);
    check(g_pipe[0].got == NTOK && g_pipe[3].got == NTOK, "extra tokens appeared");
    check(period[2] < period[0] && period[3] < period[1], "PS0 not faster than PC0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
