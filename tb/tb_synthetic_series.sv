// tb_synthetic_series: streams a synthetic series of the size of the
// network's main evaluation set (5000 training + 5000 test samples) through
// the default-size network, back to back as fast as x_ready allows.
// The series is a driven, damped particle in a double-well potential
// (x'' = -0.3 x' + x - x^3 + 0.5 cos(1.2 t)), integrated with a fixed-step
// fourth-order Runge-Kutta routine (step 0.05, one sample every 10 steps)
// and scaled to 8-bit fractions: sample = floor(64 * (x + 2)), limited to
// [0, 255]. Every prediction is compared with the reference network model,
// and every prediction must come 957 clocks after its sample. With the
// placeholder coefficients the predictions are not meaningful forecasts;
// the test shows that the hardware computes the network exactly over a long
// run. The clock count for the whole set is reported.
module tb_synthetic_series;
  import tb_ref_pkg::*;
  localparam int NS  = 10000;
  localparam longint LAT = 957;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic [7:0] x_data = '0, y_data, sat_count;
  logic x_ready, y_valid;
  int checks = 0, failures = 0;

  fir_nn_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_net ref_model = new();
  int     y_exp [$];
  longint cyc = 0, t_acc = 0, t_first = 0;
  int     n_pred = 0, lo = 255, hi = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) begin
        t_acc = cyc;
        if (t_first == 0) t_first = cyc;
      end
      if (y_valid) begin
        int e;
        e = (y_exp.size() > 0) ? y_exp.pop_front() : -1;
        checks += 2;
        if (int'(y_data) != e) begin
          failures++;
          if (failures < 10) $display("prediction %0d: got %0d expected %0d", n_pred, y_data, e);
        end
        if (cyc - t_acc != LAT) begin
          failures++;
          if (failures < 10) $display("prediction %0d after %0d clocks", n_pred, cyc - t_acc);
        end
        if (int'(y_data) < lo) lo = int'(y_data);
        if (int'(y_data) > hi) hi = int'(y_data);
        n_pred++;
      end
    end
    cyc++;
  end

  // Right-hand side of the particle's equation of motion.
  function automatic void deriv(input real t, input real x, input real v,
                                output real dx, output real dv);
    dx = v;
    dv = -0.3 * v + x - x * x * x + 0.5 * $cos(1.2 * t);
  endfunction

  initial begin
    real t, x, v, h;
    real k1x, k1v, k2x, k2v, k3x, k3v, k4x, k4v;
    int  xs;
    t = 0.0; x = 0.5; v = 0.0; h = 0.05;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < NS; k++) begin
      for (int s = 0; s < 10; s++) begin
        deriv(t, x, v, k1x, k1v);
        deriv(t + h / 2, x + h / 2 * k1x, v + h / 2 * k1v, k2x, k2v);
        deriv(t + h / 2, x + h / 2 * k2x, v + h / 2 * k2v, k3x, k3v);
        deriv(t + h, x + h * k3x, v + h * k3v, k4x, k4v);
        x = x + h / 6 * (k1x + 2 * k2x + 2 * k3x + k4x);
        v = v + h / 6 * (k1v + 2 * k2v + 2 * k3v + k4v);
        t = t + h;
      end
      xs = int'($floor(64.0 * (x + 2.0)));
      if (xs < 0) xs = 0;
      if (xs > 255) xs = 255;
      @(negedge clk);
      x_valid = 1; x_data = 8'(xs);
      y_exp.push_back(ref_model.step(xs));
      #1;
      while (!x_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      x_valid = 0;
      while (!x_ready) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (n_pred != NS) begin failures++; $display("%0d predictions", n_pred); end
    $display("%0d samples in %0d clocks; predictions ranged %0d..%0d", NS, cyc - t_first, lo, hi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
