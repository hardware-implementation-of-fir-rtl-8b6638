// tb_fir_neuron: runs a 40-connection neuron (layer 2, neuron 8) through
// complete dot products: bias preload, 40 multiply-accumulates of random
// data words, capture, and a bus read. The bus value must equal the 16-bit
// saturation of bias*256 + sum(coeff*data); the bus must read 0 when the
// neuron is not selected. One round feeds 255 wherever the coefficient is
// positive, which drives the sum past +8 and must saturate.
module tb_fir_neuron;
  import tb_ref_pkg::*;
  localparam int LAYER = 2, NEURON = 8, DEPTH = 40;
  logic clk = 0, rst_n = 0, load = 0, issue = 0, capture = 0, bus_sel = 0;
  logic [5:0] addr = '0;
  logic [7:0] data = '0;
  logic ready, idle, sat;
  logic signed [15:0] bus_out;
  int checks = 0, failures = 0, sat_seen = 0;

  fir_neuron #(.LAYER(LAYER), .NEURON(NEURON), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum, expv;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 20; r++) begin
      @(negedge clk);
      load = 1; @(negedge clk); load = 0;
      sum = 0;
      for (int a = 0; a < DEPTH; a++) begin
        addr = 6'(a);
        data = 8'($urandom);
        if (r == 0) data = (ref_coeff(LAYER, NEURON, a) > 0) ? 8'd255 : 8'd0;
        if (r == 1) data = 8'd0;
        issue = 1;
        #1;
        while (!ready) begin @(negedge clk); #1; end
        sum += ref_coeff(LAYER, NEURON, a) * int'(data);
        @(negedge clk);
        issue = 0;
      end
      while (!idle) @(negedge clk);
      capture = 1; @(negedge clk); capture = 0;
      checks++;
      if (bus_out !== 16'sd0) begin failures++; $display("bus driven while not selected"); end
      bus_sel = 1; #1;
      expv = ref_neuron_sum(ref_bias(LAYER, NEURON), sum);
      checks += 2;
      if (int'(bus_out) != expv) begin
        failures++;
        $display("round %0d: bus %0d expected %0d", r, bus_out, expv);
      end
      if (sat != (expv == 32767 || expv == -32768)) begin failures++; $display("sat flag wrong"); end
      if (sat) sat_seen++;
      @(negedge clk); bus_sel = 0;
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
