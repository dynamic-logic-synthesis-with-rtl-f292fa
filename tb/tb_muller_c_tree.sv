// tb_muller_c_tree: five-input C element. Inputs rise one by one in random
// order, then fall one by one; the output must not change until the last
// input has changed and must follow within ceil(log2 5) = 3 clocks.
module tb_muller_c_tree;
  localparam int N = 5;
  localparam int LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in = '0;
  logic out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  muller_c_tree #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in(in), .out(out));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic sweep(input logic level);
    logic [N-1:0] todo;
    int k;
    todo = '1;
    while (todo != '0) begin
      k = $urandom % N;
      if (todo[k]) begin
        todo[k] = 1'b0;
        in[k] = level;
        repeat (1 + $urandom % 4) begin
          @(negedge clk);
          if (todo != '0) chk(out == ~level, $sformatf("early change to %b", level));
        end
      end
    end
    repeat (LAT) @(negedge clk);
    chk(out == level, $sformatf("output did not reach %b", level));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(out == 1'b0, "reset value");
    for (int i = 0; i < 200; i++) begin
      sweep(1'b1);
      sweep(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
