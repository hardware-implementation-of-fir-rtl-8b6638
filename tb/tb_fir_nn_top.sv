// tb_fir_nn_top: end-to-end test of the 1:10:10:1 FIR network with 20:4:4
// taps at its default size. A synthetic series (a driven, damped oscillator
// sampled and scaled to [0,1)) is fed one sample at a time; for every sample
// the prediction must equal a reference model of the whole network written
// here (delay lines, bias + FIR sums, 16-bit saturation, sigmoid), and the
// prediction must follow the sample after exactly 957 clocks
// (12 + 9*20 + 10, 12 + 9*40 + 10 and 12 + 9*40 + 1 for the three layers).
// It also counts the network's mechanisms and fails if one never occurred:
// sample accepted while the network was idle, sample held off while busy
// (x_ready low), every hidden result leaving on its layer's shared bus in
// order, and the first-layer delay line running full (older samples
// dropping out). Saturated neuron sums are reported.
module tb_fir_nn_top;
  import tb_ref_pkg::*;
  localparam int NS = 60;          // samples
  localparam longint LAT = 957;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic [7:0] x_data = '0, y_data, sat_count;
  logic x_ready, y_valid;
  int checks = 0, failures = 0;

  fir_nn_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_net ref_model = new();
  int     y_exp [$];

  // Monitors.
  longint cyc = 0, t_acc = 0;
  int n_pred = 0, n_accept = 0, n_holdoff = 0, n_l1 = 0, n_l2 = 0, n_full = 0;
  int exp_idx1 = 0, exp_idx2 = 0, bus_order_err = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) begin n_accept++; t_acc = cyc; if (n_accept > 20) n_full++; end
      if (x_valid && !x_ready) n_holdoff++;
      if (dut.l1_valid) begin
        if (int'(dut.l1_idx) != exp_idx1) bus_order_err++;
        exp_idx1 = (exp_idx1 + 1) % 10; n_l1++;
      end
      if (dut.l2_valid) begin
        if (int'(dut.l2_idx) != exp_idx2) bus_order_err++;
        exp_idx2 = (exp_idx2 + 1) % 10; n_l2++;
      end
      if (y_valid) begin
        int e;
        e = (y_exp.size() > 0) ? y_exp.pop_front() : -1;
        checks += 2;
        if (int'(y_data) != e) begin
          failures++;
          $display("prediction %0d: got %0d expected %0d", n_pred, y_data, e);
        end
        if (cyc - t_acc != LAT) begin
          failures++;
          $display("prediction %0d after %0d clocks", n_pred, cyc - t_acc);
        end
        n_pred++;
      end
    end
    cyc++;
  end

  initial begin
    real ph, v;
    int  xs;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    v = 0.0;
    for (int k = 0; k < NS; k++) begin
      ph = 2.0 * 3.14159265 * real'(k) / 13.0;
      v  = 0.6 * v + 0.5 * $sin(ph) + 0.2 * $sin(ph * 0.37);
      xs = int'($floor(128.0 + 100.0 * v));
      if (xs < 0) xs = 0;
      if (xs > 255) xs = 255;
      @(negedge clk);
      x_valid = 1; x_data = 8'(xs);
      y_exp.push_back(ref_model.step(xs));
      #1;
      while (!x_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      // Offer the next sample early for some steps so it must wait.
      x_valid = (k % 3 == 0);
      x_data = 8'($urandom);
      if (x_valid) begin
        repeat (50) @(negedge clk);
        checks++;
        if (x_ready) begin failures++; $display("network accepted a sample while busy"); end
        x_valid = 0;
      end
      while (!x_ready) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks += 7;
    if (n_pred != NS)      begin failures++; $display("%0d predictions", n_pred); end
    if (y_exp.size() != 0) begin failures++; $display("predictions missing"); end
    if (n_holdoff == 0)    begin failures++; $display("hold-off never exercised"); end
    if (n_l1 != 10 * NS)   begin failures++; $display("%0d layer-1 bus results", n_l1); end
    if (n_l2 != 10 * NS)   begin failures++; $display("%0d layer-2 bus results", n_l2); end
    if (bus_order_err != 0) begin failures++; $display("bus order errors %0d", bus_order_err); end
    if (n_full == 0)       begin failures++; $display("delay line never ran full"); end
    $display("mechanisms: accepted=%0d held_off_cycles=%0d l1_bus=%0d l2_bus=%0d full_line_samples=%0d saturated_sums=%0d",
             n_accept, n_holdoff, n_l1, n_l2, n_full, sat_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
