// tb_msb_gen: the look-ahead estimate against whole-word arithmetic.
// For random 16-bit carry-save words S, C, divisor D and digit q the
// expected estimate is the sum of the top three bits of the two vectors
// that a full carry-save addition of S, C and -qD, shifted left by one,
// would produce (computed here with word-wide XOR / majority and shifts).
// Also checks that P waits for q after S and C are valid.
module tb_msb_gen;
  import st_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  dr_t [3:0] s = '0, c = '0;
  logic [3:0] d = '0;
  qd_t q = '0;
  dr_t [2:0] p;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  msb_gen dut (.clk(clk), .rst_n(rst_n), .eval(eval), .s(s), .c(c), .d(d), .q(q), .p(p));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [W-1:0] sw, cw, dw, aw, s2, c2;
    logic [2:0] expp, gotp;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      sw = W'($urandom); cw = W'($urandom) & ~W'(1); dw = W'($urandom);
      v = int'($urandom % 3) - 1;
      aw = (v == 1) ? ~dw : ((v == -1) ? dw : '0);
      s2 = (sw ^ cw ^ aw) << 1;
      c2 = (((sw & cw) | (sw & aw) | (cw & aw)) << 2) | (W'(v == 1) << 1);
      expp = s2[W-1:W-3] + c2[W-1:W-3];
      eval = 1'b1;
      for (int j = 0; j < 4; j++) begin
        s[j] = dr_enc(sw[W-5+j]);
        c[j] = dr_enc(cw[W-5+j]);
      end
      d = dw[W-2:W-5];
      repeat (2) @(negedge clk);
      chk(p == '0, "estimate before the digit arrived");
      q = '{p: v == 1, z: v == 0, n: v == -1};
      @(negedge clk);
      for (int j = 0; j < 3; j++) gotp[j] = p[j].t;
      chk(dr_valid(p[0]) && dr_valid(p[1]) && dr_valid(p[2]), "estimate not valid one clock after q");
      chk(gotp == expp, $sformatf("S=%h C=%h D=%h q=%0d exp=%0d got=%0d", sw, cw, dw, v, expp, gotp));
      s = '0; c = '0; q = '0; eval = 1'b0;
      @(negedge clk);
      chk(p == '0, "not precharged");
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
