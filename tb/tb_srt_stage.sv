// tb_srt_stage: one divider stage between a testbench predecessor and
// successor. For random carry-save remainders, divisors, digits and flags
// it checks the full 4-phase cycle: no evaluation while the successor
// still holds the previous result; after evaluation the output vectors are
// the left-shifted carry-save sum of S, C and -qD (computed with word-wide
// logic), the digit follows the selection table from the top three bits of
// the new vectors and the flag is set for an estimate of -4; `done` rises;
// after the successor acknowledges and the input empties, the stage
// precharges and `done` falls.
module tb_srt_stage;
  import st_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0;
  dr_t [W-1:0] s_in = '0, c_in = '0, s_out, c_out;
  qd_t q_in = '0, q_out;
  dr_t f_in = '0, f_out;
  logic in_done = 1'b0, succ_done = 1'b0, done, eval;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  srt_stage #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d(d),
    .s_in(s_in), .c_in(c_in), .q_in(q_in), .f_in(f_in), .in_done(in_done),
    .s_out(s_out), .c_out(c_out), .q_out(q_out), .f_out(f_out),
    .succ_done(succ_done), .done(done), .eval(eval));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wait_done(input logic level);
    int n;
    n = 0;
    while (done != level && n < 50) begin @(negedge clk); n++; end
    chk(done == level, $sformatf("done did not reach %b", level));
  endtask

  initial begin
    logic [W-1:0] sw, cw, aw, s2, c2, so, co;
    logic [2:0] pm;
    int v, fl, qexp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      sw = W'($urandom) & ~W'(1);
      cw = W'($urandom) & ~W'(1);
      d  = {3'b001, 13'($urandom)};
      v  = int'($urandom % 3) - 1;
      fl = int'($urandom % 4 == 0);
      // successor still holds the last result: input must not be taken
      succ_done = 1'b1;
      for (int j = 0; j < W; j++) begin
        s_in[j] = dr_enc(sw[j]);
        c_in[j] = dr_enc(cw[j]);
      end
      q_in = '{p: v == 1, z: v == 0, n: v == -1};
      f_in = dr_enc(fl[0]);
      in_done = 1'b1;
      repeat (4) @(negedge clk);
      chk(!eval && !done, "evaluated while the successor was full");
      succ_done = 1'b0;
      wait_done(1'b1);
      aw = (v == 1) ? ~d : ((v == -1) ? d : '0);
      s2 = (sw ^ cw ^ aw) << 1;
      c2 = (((sw & cw) | (sw & aw) | (cw & aw)) << 2) | (W'(v == 1) << 1);
      for (int j = 0; j < W; j++) begin
        so[j] = s_out[j].t;
        co[j] = c_out[j].t;
      end
      chk(so == s2 && co == c2, $sformatf("carry-save output S=%h C=%h D=%h q=%0d", sw, cw, d, v));
      chk(W'(so + co) == W'(2 * (int'(sw) + int'(cw) - v * int'(d))), "remainder value");
      pm = s2[W-1:W-3] + c2[W-1:W-3];
      qexp = fl ? -1 : (!pm[2] ? 1 : (pm == 3'b111 ? 0 : -1));
      chk(q_out == '{p: qexp == 1, z: qexp == 0, n: qexp == -1},
          $sformatf("digit P=%b F=%0d", pm, fl));
      chk(f_out == dr_enc(pm == 3'b100), "force-ahead flag");
      // successor takes the result, predecessor resets
      succ_done = 1'b1;
      s_in = '0; c_in = '0; q_in = '0; f_in = '0;
      in_done = 1'b0;
      wait_done(1'b0);
      chk(s_out == '0 && c_out == '0 && q_out == '0 && f_out == '0, "outputs not precharged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
