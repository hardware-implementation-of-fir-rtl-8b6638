// tb_mac_unit: checks the digit-serial MAC unit. Each round preloads a
// random bias, issues a random number of weight/data pairs as fast as
// 'ready' allows, waits for 'idle' and compares the accumulator with
// bias + sum(w*d) modulo 2^18. It also checks the rate: back-to-back words
// are accepted every 9 clocks, and idle rises 9*N + 8 clocks (one to load the input register, 9 per word, 7 in the multiplier) after the
// first issue of N words.
module tb_mac_unit;
  logic clk = 0, rst_n = 0, load = 0, issue = 0, ready, idle;
  logic signed [17:0] acc_init = '0, acc;
  logic signed [7:0]  w = '0;
  logic        [7:0]  d = '0;
  int checks = 0, failures = 0;

  mac_unit #(.DIGIT(2), .W_W(8), .D_W(8), .ACC_W(18)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, n, issued, c0, c, last_issue;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 60; r++) begin
      @(negedge clk);
      acc_init = 18'($signed(($urandom % 4096)) - 2048);
      if (r == 1) acc_init = 18'sd131071 - 18'sd100;   // wraps past +2^17
      expected = int'(acc_init);
      load = 1;
      @(negedge clk);
      load = 0;
      n = 1 + ($urandom % 40);
      issued = 0; c = 0; c0 = 0; last_issue = 0;
      while (issued < n) begin
        w = 8'($urandom); d = 8'($urandom);
        issue = 1;
        #1;
        if (ready) begin
          if (issued == 0) c0 = c;
          else begin
            checks++;
            if (c - last_issue != 9) begin
              failures++;
              $display("issue spacing %0d", c - last_issue);
            end
          end
          last_issue = c;
          expected += int'(w) * int'(d);
          issued++;
        end
        @(negedge clk); c++;
      end
      issue = 0;
      while (!idle) begin @(negedge clk); c++; end
      checks += 2;
      if (c - c0 != 9 * n + 8) begin
        failures++;
        $display("idle after %0d cycles, expected %0d", c - c0, 9 * n + 8);
      end
      if (acc !== 18'(expected)) begin
        failures++;
        $display("acc %h expected %h", acc, 18'(expected));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
