// tb_tap_delay_line: shifts random samples into a 20-tap delay line (with
// idle cycles in between) and reads every tap after each write; tap m must
// hold the sample written m writes ago, or 0 before that many writes.
module tb_tap_delay_line;
  localparam int TAPS = 20;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [7:0] din = '0, dout;
  logic [4:0] sel = '0;
  int checks = 0, failures = 0;
  logic [7:0] hist [$];

  tap_delay_line #(.TAPS(TAPS), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      din = 8'($urandom); shift = 1;
      hist.push_front(din);
      @(negedge clk);
      shift = 0; din = 8'($urandom);
      for (int m = 0; m < TAPS; m++) begin
        sel = 5'(m);
        #1;
        checks++;
        if (dout !== ((m < hist.size()) ? hist[m] : 8'd0)) begin
          failures++;
          $display("k=%0d tap %0d got %h", k, m, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
