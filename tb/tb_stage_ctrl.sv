// tb_stage_ctrl: the PC0 controller against the thesis' signal table
// (ack_out = 1 and req_in = 0 start evaluation, ack_out = 0 and req_in = 1
// start precharge, anything else holds), and the PS0 variant, whose eval is
// the successor's acknowledge itself.
module tb_stage_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, req_in = 1'b1, ack_out = 1'b1;
  logic eval_pc0, eval_ps0, exp_eval;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  stage_ctrl #(.USE_C(1'b1)) dut_pc0 (.clk(clk), .rst_n(rst_n), .req_in(req_in),
                                      .ack_out(ack_out), .eval(eval_pc0));
  stage_ctrl #(.USE_C(1'b0)) dut_ps0 (.clk(clk), .rst_n(rst_n), .req_in(req_in),
                                      .ack_out(ack_out), .eval(eval_ps0));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_eval = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      req_in  = 1'($urandom);
      ack_out = 1'($urandom);
      #1;
      checks++;
      if (eval_ps0 !== ack_out) begin failures++; $display("FAIL: PS0 eval"); end
      @(negedge clk);
      if (ack_out && !req_in) exp_eval = 1'b1;
      else if (!ack_out && req_in) exp_eval = 1'b0;
      checks++;
      if (eval_pc0 !== exp_eval) begin
        failures++;
        $display("FAIL: PC0 req_in=%b ack_out=%b eval=%b exp=%b", req_in, ack_out, eval_pc0, exp_eval);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
