// tb_cvsl_encoded_cell: programs the five-input cell with the four cell
// functions of the thesis' transistor-count comparison (5-bit majority,
// 5-bit XOR, prime detector, divisible-by-3 detector) and checks all 32
// input words of each against the function computed here, including that
// the output stays empty until the last input is valid and after precharge.
// The program words are derived from the functions in the testbench.
module tb_cvsl_encoded_cell;
  import st_pkg::*;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0, eval = 1'b0;
  dr_t [N-1:0] x = '0;
  logic [2**(N-1)-1:0][1:0] prog = '0;
  dr_t y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cvsl_encoded_cell #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .eval(eval), .x(x), .prog(prog), .y(y));

  // value v = {x[0], ..., x[N-1]} (x[0] most significant)
  function automatic bit func(input int which, input int v);
    int ones;
    ones = $countones(5'(v));
    case (which)
      0: return ones >= 3;                                      // majority
      1: return ones % 2 == 1;                                  // XOR
      2: return v inside {2, 3, 5, 7, 11, 13, 17, 19, 23, 29, 31}; // prime
      default: return v % 3 == 0;                               // mod 3
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 4; w++) begin
      for (int k = 0; k < 2**(N-1); k++) prog[k] = {func(w, 2*k), func(w, 2*k+1)};
      for (int v = 0; v < 32; v++) begin
        eval = 1'b1;
        for (int i = 0; i < N - 1; i++) x[i] = dr_enc(v[N-1-i]);
        @(negedge clk);
        checks++;
        if (y != '0) begin failures++; $display("FAIL: output before last input"); end
        x[N-1] = dr_enc(v[0]);
        @(negedge clk);
        checks++;
        if (y != dr_enc(func(w, v))) begin
          failures++;
          $display("FAIL: function %0d input %b got %b%b", w, 5'(v), y.t, y.f);
        end
        x = '0; eval = 1'b0;
        @(negedge clk);
        checks++;
        if (y != '0) begin failures++; $display("FAIL: not precharged"); end
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
