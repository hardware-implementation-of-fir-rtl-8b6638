// tb_ref_pkg: reference arithmetic for the FIR network testbenches.
//
// Integer models written without reference to the RTL datapath: the default
// coefficient and bias contents (same hash formula as the design's
// coefficient package, re-derived here), the 16-bit saturation and the
// sigmoid table computed with real arithmetic from 1/(1+exp(-x)).
package tb_ref_pkg;

  function automatic int unsigned hmix(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic int ref_coeff(input int layer, input int neuron, input int addr);
    int unsigned h;
    h = hmix(layer * 32'h9E3779B1 + neuron * 32'h85EBCA77 + addr * 32'hC2B2AE3D + 32'h27D4EB2F);
    return int'(h % 25) - 12;
  endfunction

  function automatic int ref_bias(input int layer, input int neuron);
    int unsigned h;
    h = hmix(layer * 32'h9E3779B1 + neuron * 32'h85EBCA77 + 32'h165667B1);
    return int'(h % 17) - 8;
  endfunction

  // Clip to the signed 16-bit range.
  function automatic int ref_sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Sigmoid of a Q3.12 value, quantised to 1/16 at the input (floor) and
  // to Q0.8 at the output, limited to 255.
  function automatic int ref_sigmoid(input int r16);
    int    s;
    real   x, f;
    int    y;
    s = r16 >>> 8;                 // floor(r16 / 256)
    x = real'(s) / 16.0;
    f = 256.0 / (1.0 + $exp(-x));
    y = int'($floor(f + 0.5));
    return (y > 255) ? 255 : y;
  endfunction

  // Neuron output: bias and weighted sum of data words (Q0.8 x Q3.4).
  function automatic int ref_neuron_sum(input int bias, input int acc_products);
    return ref_sat16(bias * 256 + acc_products);
  endfunction

  // Reference model of the whole 1:10:10:1 network with 20:4:4 taps:
  // delay lines that start at zero, FIR sums, saturation and sigmoid.
  class ref_net;
    int xh  [20];
    int h1h [10][4];
    int h2h [10][4];

    function new();
      foreach (xh[m]) xh[m] = 0;
      foreach (h1h[c, m]) begin h1h[c][m] = 0; h2h[c][m] = 0; end
    endfunction

    static function int neuron(input int layer, input int n, input int s);
      return ref_sigmoid(ref_neuron_sum(ref_bias(layer, n), s));
    endfunction

    // Feed sample x, return the prediction.
    function int step(input int x);
      int h1 [10];
      int h2 [10];
      int s;
      for (int m = 19; m > 0; m--) xh[m] = xh[m-1];
      xh[0] = x;
      for (int n = 0; n < 10; n++) begin
        s = 0;
        for (int m = 0; m < 20; m++) s += ref_coeff(1, n, m) * xh[m];
        h1[n] = neuron(1, n, s);
      end
      for (int c = 0; c < 10; c++) begin
        for (int m = 3; m > 0; m--) h1h[c][m] = h1h[c][m-1];
        h1h[c][0] = h1[c];
      end
      for (int n = 0; n < 10; n++) begin
        s = 0;
        for (int c = 0; c < 10; c++)
          for (int m = 0; m < 4; m++) s += ref_coeff(2, n, c * 4 + m) * h1h[c][m];
        h2[n] = neuron(2, n, s);
      end
      for (int c = 0; c < 10; c++) begin
        for (int m = 3; m > 0; m--) h2h[c][m] = h2h[c][m-1];
        h2h[c][0] = h2[c];
      end
      s = 0;
      for (int c = 0; c < 10; c++)
        for (int m = 0; m < 4; m++) s += ref_coeff(3, 0, c * 4 + m) * h2h[c][m];
      return neuron(3, 0, s);
    endfunction
  endclass

endpackage
