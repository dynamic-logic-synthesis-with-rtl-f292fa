// tb_remainder_compare: sequences of loop-end tokens, some repeating the
// previous one. `equal` must be high exactly when the current token equals
// the token captured one loop earlier, never before a first loop has been
// stored and never right after `clear`.
module tb_remainder_compare;
  localparam int TW = 12;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, capture = 1'b0, advance = 1'b0;
  logic [TW-1:0] cur = '0, last, prevm;
  logic equal;
  bit have;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  remainder_compare #(.TW(TW)) dut (.clk(clk), .rst_n(rst_n), .clear(clear),
    .capture(capture), .advance(advance), .cur(cur), .last(last), .equal(equal));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 100; r++) begin
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      // the token stored before the clear must not count as a match
      if (r > 0) begin
        cur = prevm;
        #1;
        chk(!equal, "match against a token from before clear");
      end
      have = 1'b0;
      for (int i = 0; i < 6; i++) begin
        // a token arrives: repeat the previous one half of the time
        if (have && $urandom % 2) cur = prevm; else cur = TW'($urandom);
        #1;
        chk(equal == (have && cur == prevm), "equal while the token is present");
        capture = 1'b1; @(negedge clk); capture = 1'b0;
        chk(last == cur, "captured token");
        // the token leaves
        advance = 1'b1; @(negedge clk); advance = 1'b0;
        prevm = cur; have = 1'b1;
        cur = ~cur;
        #1;
        chk(!equal, "equal with a different token");
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
