// tb_fir_layer: runs a small layer (layer 2 coefficients, 3 input channels,
// 4 taps, 3 neurons) for 25 time steps. Each step writes a new random value
// into every channel's delay line, starts the layer and collects the three
// results from the shared bus. Each result must equal the reference FIR
// neuron: sigmoid(sat16(bias*256 + sum over channels and taps of
// coeff * x_c(k-m))), with the delay lines starting from zero. It also
// checks the result order on the bus and the run time of 12 + 9*CH*TAPS +
// NEURONS clocks from start to done.
module tb_fir_layer;
  import tb_ref_pkg::*;
  localparam int LAYER = 2, CH = 3, TAPS = 4, NEURONS = 3;
  localparam longint RUN = longint'(12 + 9 * CH * TAPS) + longint'(NEURONS);   // clocks from start to done
  logic clk = 0, rst_n = 0, in_valid = 0, start = 0;
  logic [1:0] in_ch = '0;
  logic [7:0] in_data = '0, out_data, sat_count;
  logic busy, done, out_valid;
  logic [1:0] out_idx;
  int checks = 0, failures = 0;

  fir_layer #(.LAYER(LAYER), .CH(CH), .TAPS(TAPS), .NEURONS(NEURONS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [CH][TAPS];
  int expected [NEURONS];
  int n_out;
  longint cyc = 0, t_start;

  always @(posedge clk) if (rst_n) begin
    if (start) t_start = cyc;
    if (out_valid) begin
      checks += 2;
      if (int'(out_idx) != n_out) begin failures++; $display("result order %0d", out_idx); end
      if (int'(out_data) != expected[out_idx]) begin
        failures++;
        $display("neuron %0d got %0d expected %0d", out_idx, out_data, expected[out_idx]);
      end
      n_out++;
    end
    if (done) begin
      checks++;
      if (cyc - t_start != RUN) begin
        failures++;
        $display("run took %0d clocks", cyc - t_start);
      end
    end
    cyc++;
  end

  initial begin
    int s;
    for (int c = 0; c < CH; c++) for (int m = 0; m < TAPS; m++) hist[c][m] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 25; k++) begin
      for (int c = 0; c < CH; c++) begin
        @(negedge clk);
        in_valid = 1; in_ch = 2'(c); in_data = 8'($urandom);
        for (int m = TAPS - 1; m > 0; m--) hist[c][m] = hist[c][m-1];
        hist[c][0] = int'(in_data);
      end
      @(negedge clk);
      in_valid = 0;
      for (int n = 0; n < NEURONS; n++) begin
        s = 0;
        for (int c = 0; c < CH; c++)
          for (int m = 0; m < TAPS; m++) s += ref_coeff(LAYER, n, c * TAPS + m) * hist[c][m];
        expected[n] = ref_sigmoid(ref_neuron_sum(ref_bias(LAYER, n), s));
      end
      n_out = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      checks++;
      if (n_out != NEURONS) begin failures++; $display("%0d results", n_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
