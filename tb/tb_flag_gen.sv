// tb_flag_gen: all eight estimates; the flag is 1 only for P = -4 (100).
module tb_flag_gen;
  import st_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  dr_t [2:0] p = '0;
  dr_t f;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  flag_gen dut (.clk(clk), .rst_n(rst_n), .eval(eval), .p(p), .f(f));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 8; i++) begin
        eval = 1'b1;
        p[2] = dr_enc(i[2]);
        p[1] = dr_enc(i[1]);
        @(negedge clk);
        checks++;
        if (f != '0) begin failures++; $display("FAIL: early flag"); end
        p[0] = dr_enc(i[0]);
        @(negedge clk);
        checks++;
        if (f != dr_enc(i == 4)) begin failures++; $display("FAIL: P=%b F=%b%b", 3'(i), f.t, f.f); end
        p = '0; eval = 1'b0;
        @(negedge clk);
        checks++;
        if (f != '0) begin failures++; $display("FAIL: not precharged"); end
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
