// tb_address_generator: for 3 channels x 4 taps, steps through all
// addresses (with stalls) and checks addr = ch*4 + tap in channel-major
// order, 'last' only at the final address, holding there, and 'clear'.
module tb_address_generator;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [3:0] addr;
  logic [1:0] ch, tap;
  logic last;
  int checks = 0, failures = 0;

  address_generator #(.CH(3), .TAPS(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int a = 0; a < 12; a++) begin
        checks += 4;
        if (int'(addr) != a)     begin failures++; $display("addr %0d exp %0d", addr, a); end
        if (int'(ch)   != a / 4) begin failures++; $display("ch %0d at %0d", ch, a); end
        if (int'(tap)  != a % 4) begin failures++; $display("tap %0d at %0d", tap, a); end
        if (last != (a == 11))   begin failures++; $display("last wrong at %0d", a); end
        if (r == 1 && a == 5) begin step = 0; @(negedge clk); end   // stall
        step = 1; @(negedge clk); step = 0;
      end
      checks++;
      if (int'(addr) != 11 || !last) begin failures++; $display("did not hold at last"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
