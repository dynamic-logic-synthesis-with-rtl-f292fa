// tb_quotient_gen: all 16 input rows of the quotient selection truth table
// (inputs F P2 P1 P0, outputs q1 q-1 q0), written out row by row.
module tb_quotient_gen;
  import st_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  dr_t [2:0] p = '0;
  dr_t f = '0;
  qd_t q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // Row index {F,P2,P1,P0}; entry {q1, q-1, q0}.
  localparam logic [2:0] TABLE [16] = '{
    3'b100, 3'b100, 3'b100, 3'b100, 3'b010, 3'b010, 3'b010, 3'b001,
    3'b010, 3'b010, 3'b010, 3'b010, 3'b010, 3'b010, 3'b010, 3'b010};

  quotient_gen dut (.clk(clk), .rst_n(rst_n), .eval(eval), .p(p), .f(f), .q(q));

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 16; i++) begin
        eval = 1'b1;
        p = {dr_enc(i[2]), dr_enc(i[1]), dr_enc(i[0])};
        @(negedge clk);
        checks++;
        if (q != '0) begin failures++; $display("FAIL: digit without F"); end
        f = dr_enc(i[3]);
        @(negedge clk);
        checks++;
        if ({q.p, q.n, q.z} != TABLE[i]) begin
          failures++;
          $display("FAIL: row %b got q1,q-1,q0=%b%b%b", 4'(i), q.p, q.n, q.z);
        end
        p = '0; f = '0; eval = 1'b0;
        @(negedge clk);
        checks++;
        if (q != '0) begin failures++; $display("FAIL: not precharged"); end
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
