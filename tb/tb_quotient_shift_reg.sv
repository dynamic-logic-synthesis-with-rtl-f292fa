// tb_quotient_shift_reg: digits arrive as 4-phase tokens (valid, then empty
// spacer of random length). Exactly one shift per token is expected, newest
// digit in entry 0, and nothing is captured while `enable` is low.
module tb_quotient_shift_reg;
  import st_pkg::*;
  localparam int DEPTH = 3;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, enable = 1'b0;
  qd_t q = '0;
  logic [DEPTH-1:0] pos, neg, ep, en;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, ecount;
  always #5 clk = ~clk;

  quotient_shift_reg #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .clear(clear),
    .enable(enable), .q(q), .pos(pos), .neg(neg), .count(count));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int v;
    bit en_now;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 100; r++) begin
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      ep = '0; en = '0; ecount = 0;
      chk(pos == '0 && neg == '0 && count == 0, "clear");
      for (int i = 0; i < DEPTH + 1; i++) begin
        v = int'($urandom % 3) - 1;
        en_now = ($urandom % 5) != 0;
        enable = en_now;
        q = '{p: v == 1, z: v == 0, n: v == -1};
        repeat (1 + $urandom % 3) @(negedge clk);
        q = '0;
        repeat (1 + $urandom % 3) @(negedge clk);
        if (en_now) begin
          ep = {ep[DEPTH-2:0], v == 1};
          en = {en[DEPTH-2:0], v == -1};
          if (ecount < DEPTH) ecount++;
        end
        chk(pos == ep && neg == en, $sformatf("contents pos=%b neg=%b exp %b %b", pos, neg, ep, en));
        chk(int'(count) == ecount, "count");
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
