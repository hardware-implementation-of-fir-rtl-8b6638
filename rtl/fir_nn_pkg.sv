// fir_nn_pkg: number formats and default coefficient contents shared by the
// FIR neural network modules.
//
// Number formats (this design's choice; the source fixes only the widths:
// 8-bit data, 8-bit weights, 18-bit accumulator, 16-bit output register):
//   data / sigmoid output  8-bit unsigned, value = d / 256        (Q0.8)
//   weight and bias        8-bit signed,   value = w / 16         (Q3.4)
//   product, accumulator   18-bit signed,  value = a / 4096       (Q5.12)
//   neuron output register 16-bit signed,  value = r / 4096       (Q3.12)
//
// The trained filter coefficients of the network are not available, so the
// coefficient ROMs and bias registers are filled by init_coeff/init_bias, a
// fixed integer hash giving weights in [-12,12]/16 and biases in [-8,8]/16.
// With those ranges no layer can overflow the 18-bit accumulator. To load a
// trained network, replace these two functions.
package fir_nn_pkg;

  localparam int DIGIT   = 2;   // digit size N of the digit-serial arithmetic
  localparam int DATA_W  = 8;   // synaptic signal width
  localparam int COEF_W  = 8;   // filter coefficient width
  localparam int ACC_W   = 18;  // accumulator width
  localparam int OUT_W   = 16;  // neuron output register width
  localparam int BIAS_SHIFT = 8; // Q3.4 -> Q5.12 alignment

  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Coefficient of tap address 'addr' of neuron 'neuron' in layer 'layer'.
  function automatic logic signed [COEF_W-1:0] init_coeff(input int layer, input int neuron,
                                                          input int addr);
    logic [31:0] h;
    h = mix32(32'(layer) * 32'h9E3779B1 + 32'(neuron) * 32'h85EBCA77 +
              32'(addr) * 32'hC2B2AE3D + 32'h27D4EB2F);
    return COEF_W'(signed'(33'(h % 32'd25)) - 33'sd12);
  endfunction

  // Bias of neuron 'neuron' in layer 'layer'.
  function automatic logic signed [COEF_W-1:0] init_bias(input int layer, input int neuron);
    logic [31:0] h;
    h = mix32(32'(layer) * 32'h9E3779B1 + 32'(neuron) * 32'h85EBCA77 + 32'h165667B1);
    return COEF_W'(signed'(33'(h % 32'd17)) - 33'sd8);
  endfunction

endpackage
