// tb_dr_full_adder: every input combination, with inputs arriving one at a
// time. Sum and carry must stay empty until all three inputs are valid and
// then equal the binary sum a + b + cin; precharge must empty them.
module tb_dr_full_adder;
  import st_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  dr_t a = '0, b = '0, cin = '0, sum, cout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dr_full_adder dut (.clk(clk), .rst_n(rst_n), .eval(eval), .a(a), .b(b), .cin(cin),
                     .sum(sum), .cout(cout));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [1:0] total;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 8; i++) begin
        eval = 1'b1;
        a = dr_enc(i[2]);
        @(negedge clk);
        chk(!dr_valid(sum) && !dr_valid(cout), "evaluated with one input");
        b = dr_enc(i[1]);
        @(negedge clk);
        chk(!dr_valid(sum) && !dr_valid(cout), "evaluated with two inputs");
        cin = dr_enc(i[0]);
        @(negedge clk);
        total = 2'(i[2]) + 2'(i[1]) + 2'(i[0]);
        chk(sum  == dr_enc(total[0]), $sformatf("sum wrong for %b", 3'(i)));
        chk(cout == dr_enc(total[1]), $sformatf("carry wrong for %b", 3'(i)));
        a = '0; b = '0; cin = '0;
        eval = 1'b0;
        @(negedge clk);
        chk(sum == '0 && cout == '0, "not precharged");
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
