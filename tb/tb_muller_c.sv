// tb_muller_c: random stimulus against the C element rule
// (both inputs equal -> output follows one clock later, else hold).
module tb_muller_c;
  logic clk = 1'b0, rst_n = 1'b0, a = 1'b0, b = 1'b0, c;
  logic exp_c;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  muller_c dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .c(c));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_c = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      a = 1'($urandom);
      b = 1'($urandom);
      @(negedge clk);
      if (a == b) exp_c = a;
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL: a=%b b=%b c=%b exp=%b", a, b, c, exp_c);
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
