// tb_sigmoid_lut: applies every table index (plus random low bits) and
// compares the registered output with 1/(1+exp(-x)) computed in real
// arithmetic; also checks monotonicity and that 'en' low holds the output.
module tb_sigmoid_lut;
  import tb_ref_pkg::*;
  logic clk = 0, en = 0;
  logic signed [15:0] x = '0;
  logic [7:0] y;
  int checks = 0, failures = 0;

  sigmoid_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, v;
    prev = 0;
    for (int i = -128; i < 128; i++) begin
      @(negedge clk);
      v = i * 256 + int'($urandom % 256);
      x = 16'(v); en = 1;
      @(negedge clk);
      en = 0;
      checks += 2;
      if (int'(y) != ref_sigmoid(v)) begin
        failures++;
        $display("x=%0d got %0d expected %0d", v, y, ref_sigmoid(v));
      end
      if (int'(y) < prev) begin failures++; $display("not monotonic at %0d", v); end
      prev = int'(y);
      x = 16'sh7FFF;
      @(negedge clk);
      checks++;
      if (int'(y) != prev) begin failures++; $display("output changed without en"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
