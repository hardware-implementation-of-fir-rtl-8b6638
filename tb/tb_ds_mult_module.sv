// tb_ds_mult_module: checks one DSMM row. Random words X, In and bit Y are
// streamed as 9 two-bit digits; one clock later the module must deliver
// O = (In + Y*X) mod 2^18 and X' = (X << 1) mod 2^18, framed by the
// delayed first/valid flags. Y changes between words to check that it is
// sampled with the first digit.
module tb_ds_mult_module;
  localparam int DIGIT = 2;
  localparam int ND    = 9;
  localparam int WW    = DIGIT * ND;

  logic clk = 0, rst_n = 0;
  logic y_in = 0, first_in = 0, valid_in = 0;
  logic [DIGIT-1:0] x_in = '0, s_in = '0, x_out, s_out;
  logic first_out, valid_out;
  int checks = 0, failures = 0;

  ds_mult_module #(.DIGIT(DIGIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WW-1:0] exp_o [$];
  logic [WW-1:0] exp_x [$];
  logic [WW-1:0] got_o, got_x;
  int            t_out = 0;

  // Collect the outputs.
  always @(posedge clk) if (rst_n && valid_out) begin
    if (first_out) t_out = 0;
    got_o[t_out*DIGIT +: DIGIT] = s_out;
    got_x[t_out*DIGIT +: DIGIT] = x_out;
    t_out++;
    if (t_out == ND) begin
      logic [WW-1:0] eo, ex;
      eo = exp_o.pop_front();
      ex = exp_x.pop_front();
      checks += 2;
      if (got_o !== eo) begin failures++; $display("O got %h exp %h", got_o, eo); end
      if (got_x !== ex) begin failures++; $display("X' got %h exp %h", got_x, ex); end
    end
  end

  initial begin
    logic [WW-1:0] wx, ws;
    logic          wy;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 100; n++) begin
      wx = WW'($urandom); ws = WW'($urandom); wy = 1'($urandom);
      if (n < 2) wy = 1'b1;
      exp_o.push_back(ws + (wy ? wx : '0));
      exp_x.push_back(wx << 1);
      for (int t = 0; t < ND; t++) begin
        @(negedge clk);
        valid_in = 1; first_in = (t == 0);
        x_in = wx[t*DIGIT +: DIGIT];
        s_in = ws[t*DIGIT +: DIGIT];
        y_in = (t == 0) ? wy : 1'($urandom);   // only the first-digit value counts
      end
      if (n % 5 == 4) begin @(negedge clk); valid_in = 0; end
    end
    @(negedge clk); valid_in = 0;
    repeat (4) @(negedge clk);
    if (exp_o.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
