// tb_divisor_mux: for random divisors and each digit, the output bits must
// be NOT D (q = +1), 0 (q = 0) or D (q = -1), so that the selected word
// plus the q = +1 carry-in equals -q*D modulo 2^W; empty while q is empty
// or during precharge.
module tb_divisor_mux;
  import st_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  qd_t q = '0;
  logic [W-1:0] d = '0, got, expw;
  dr_t [W-1:0] a;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  divisor_mux #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .eval(eval), .q(q), .d(d), .a(a));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int v;
    bit all_valid;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      d = W'($urandom);
      v = int'($urandom % 3) - 1;
      eval = 1'b1;
      @(negedge clk);
      chk(a == '0, "evaluated without a digit");
      q = '{p: v == 1, z: v == 0, n: v == -1};
      @(negedge clk);
      all_valid = 1'b1;
      for (int j = 0; j < W; j++) begin
        got[j] = a[j].t;
        if (!dr_valid(a[j])) all_valid = 1'b0;
      end
      chk(all_valid, "output not valid");
      expw = W'(-(v * int'(d)));
      chk(W'(got + W'(v == 1)) == expw, $sformatf("q=%0d d=%h got=%h", v, d, got));
      q = '0;
      eval = 1'b0;
      @(negedge clk);
      chk(a == '0, "not precharged");
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
