// tb_ds_adder: checks the digit-serial adder on random 18-bit words sent
// back to back as 9 two-bit digits, LSD first, with idle gaps in between:
// every word's digit-serial sum must equal (a + b) mod 2^18, and the carry
// must not leak from one word into the next.
module tb_ds_adder;
  localparam int DIGIT = 2;
  localparam int ND    = 9;
  localparam int WW    = DIGIT * ND;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [DIGIT-1:0] a = '0, b = '0, sum;
  int checks = 0, failures = 0;

  ds_adder #(.DIGIT(DIGIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WW-1:0] wa, wb, got, exp_s;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      wa = WW'($urandom);
      wb = WW'($urandom);
      if (n % 4 == 0) begin wa = '1; wb = WW'(1); end   // full carry ripple
      for (int t = 0; t < ND; t++) begin
        @(negedge clk);
        en = 1; first = (t == 0);
        a = wa[t*DIGIT +: DIGIT];
        b = wb[t*DIGIT +: DIGIT];
        #1 got[t*DIGIT +: DIGIT] = sum;
      end
      exp_s = wa + wb;
      checks++;
      if (got !== exp_s) begin
        failures++;
        $display("mismatch %h + %h: got %h expected %h", wa, wb, got, exp_s);
      end
      if (n % 3 == 0) begin
        @(negedge clk);
        en = 0; a = '1; b = '1;   // idle cycle: carry must hold, inputs ignored
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
