// tb_ds_pipelined_mult: checks the 8x8 digit-serial pipelined multiplier.
// Random signed weights (streamed sign-extended as 9 two-bit digits) and
// unsigned data words are multiplied back to back and with gaps; each output
// word must equal w*d modulo 2^18 (the exact signed product), and the first
// product digit must appear exactly 7 clocks after the first weight digit.
// The data word is changed right after the last digit of each word, as the
// MAC unit does.
module tb_ds_pipelined_mult;
  localparam int DIGIT = 2;
  localparam int ND    = 9;
  localparam int WW    = DIGIT * ND;
  localparam longint LAT = 7;

  logic clk = 0, rst_n = 0;
  logic [DIGIT-1:0] x_digit = '0, p_digit;
  logic x_first = 0, x_valid = 0, p_first, p_valid, busy;
  logic [7:0] y = '0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  ds_pipelined_mult #(.DIGIT(DIGIT), .YW(8), .WORD_DIGITS(ND)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WW-1:0] exp_p [$];
  longint        t_in  [$];
  logic [WW-1:0] got;
  int            t_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (x_valid && x_first) t_in.push_back(cyc);
    if (p_valid) begin
      if (p_first) begin
        longint t0;
        t0 = t_in.pop_front();
        checks++;
        if (cyc - t0 != LAT) begin
          failures++;
          $display("latency %0d expected %0d", cyc - t0, LAT);
        end
        t_out = 0;
      end
      got[t_out*DIGIT +: DIGIT] = p_digit;
      t_out++;
      if (t_out == ND) begin
        logic [WW-1:0] e;
        e = exp_p.pop_front();
        checks++;
        if (got !== e) begin failures++; $display("product got %h exp %h", got, e); end
      end
    end
  end

  initial begin
    logic signed [7:0] w;
    logic        [7:0] d;
    logic [WW-1:0]     wx;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      w = 8'($urandom); d = 8'($urandom);
      if (n == 0) begin w = -8'sd128; d = 8'd255; end
      if (n == 1) begin w = 8'sd127;  d = 8'd255; end
      wx = WW'(w);
      exp_p.push_back(WW'(longint'(w) * longint'(d)));
      y = d;
      for (int t = 0; t < ND; t++) begin
        x_valid = 1; x_first = (t == 0);
        x_digit = wx[t*DIGIT +: DIGIT];
        @(negedge clk);
      end
      y = 8'($urandom);
      if (n % 7 == 6) begin x_valid = 0; @(negedge clk); end
    end
    x_valid = 0;
    repeat (int'(LAT) + ND + 2) @(negedge clk);
    if (exp_p.size() != 0) begin failures++; $display("missing products"); end
    checks++;
    if (busy) begin failures++; $display("busy after drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
