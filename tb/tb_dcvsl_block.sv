// tb_dcvsl_block: precharge, wait for valid inputs, evaluate, hold.
// Checks that the outputs are empty while precharging and while the inputs
// are incomplete, take the dual-rail code of `value` one clock after the
// inputs become valid, ignore later changes of `value` and return to empty
// one clock after precharge.
module tb_dcvsl_block;
  import st_pkg::*;
  localparam int NO = 4;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0, in_valid = 1'b0;
  logic [NO-1:0] value = '0, v;
  dr_t [NO-1:0] out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dcvsl_block #(.NO(NO)) dut (.clk(clk), .rst_n(rst_n), .eval(eval),
                              .in_valid(in_valid), .value(value), .out(out));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic dr_t [NO-1:0] code(input logic [NO-1:0] x);
    dr_t [NO-1:0] r;
    for (int i = 0; i < NO; i++) r[i] = '{t: x[i], f: !x[i]};
    return r;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      // precharge with inputs valid: stays empty
      eval = 1'b0; in_valid = 1'b1; value = NO'($urandom);
      @(negedge clk);
      chk(out == '0, "not empty during precharge");
      // evaluate, inputs not yet valid
      in_valid = 1'b0; eval = 1'b1;
      repeat (1 + $urandom % 3) begin
        @(negedge clk);
        chk(out == '0, "evaluated before inputs were valid");
      end
      v = NO'($urandom);
      value = v; in_valid = 1'b1;
      @(negedge clk);
      chk(out == code(v), $sformatf("wrong result for %b", v));
      // inputs change or disappear: result held
      value = ~v; in_valid = 1'($urandom);
      repeat (2) @(negedge clk);
      chk(out == code(v), "result not held");
      eval = 1'b0;
      @(negedge clk);
      chk(out == '0, "did not precharge");
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
