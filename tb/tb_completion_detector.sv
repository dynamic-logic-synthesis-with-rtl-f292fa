// tb_completion_detector: a 12-bit dual-rail word fills with random valid
// bits one at a time, then empties one at a time. `done` must stay low until
// every bit is valid, rise within ceil(log2 12) = 4 clocks after the last,
// stay high until every bit is empty and then fall within 4 clocks.
module tb_completion_detector;
  import st_pkg::*;
  localparam int N = 12;
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  dr_t [N-1:0] d = '0;
  logic done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  completion_detector #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .d(d), .done(done));

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic sweep(input bit fill);
    logic [N-1:0] todo;
    int k;
    todo = '1;
    while (todo != '0) begin
      k = $urandom % N;
      if (todo[k]) begin
        todo[k] = 1'b0;
        d[k] = fill ? dr_enc(1'($urandom)) : DR_EMPTY;
        repeat (1 + $urandom % 3) begin
          @(negedge clk);
          if (todo != '0) chk(done == !fill, "done changed before the word was complete");
        end
      end
    end
    repeat (LAT) @(negedge clk);
    chk(done == fill, "done did not follow");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 150; i++) begin
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
