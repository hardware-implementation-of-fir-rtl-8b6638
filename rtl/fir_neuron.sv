// fir_neuron: one FIR neuron.
//
// The neuron multiplies the data words broadcast by its layer (one per
// connection: every tap of every input channel) with its own coefficients and
// sums them with its bias. It contains a local coefficient ROM addressed by
// the layer's address generator, a bias register, a digit-serial MAC unit
// with an 18-bit accumulator, and a 16-bit output register. 'load' preloads
// the accumulator with the bias (Q3.4 aligned to Q5.12), each 'issue' adds
// coeff[addr] * data, and 'capture' copies the accumulator, saturated to 16
// bits, into the output register, which holds it until the layer grants this
// neuron the shared output bus ('bus_sel'); the bus is an OR of the gated
// neuron outputs, so a neuron drives zeros when not selected. 'sat' tells
// that the last capture had to saturate.
// The ROM/MAC/bias/output-register arrangement follows the source's neuron
// architecture; bias format, saturation and the OR bus are this design's.
module fir_neuron
  import fir_nn_pkg::*;
#(
  parameter int LAYER  = 1,
  parameter int NEURON = 0,
  parameter int DEPTH  = 20
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic [$clog2(DEPTH > 1 ? DEPTH : 2)-1:0] addr,
  input  logic [DATA_W-1:0]                        data,
  input  logic                                     load,
  input  logic                                     issue,
  input  logic                                     capture,
  input  logic                                     bus_sel,
  output logic                                     ready,
  output logic                                     idle,
  output logic signed [OUT_W-1:0]                  bus_out,
  output logic                                     sat
);

  localparam logic signed [COEF_W-1:0] BIAS = init_bias(LAYER, NEURON);

  logic signed [COEF_W-1:0] coeff;
  logic signed [COEF_W-1:0] bias_q;
  logic signed [ACC_W-1:0]  acc;
  logic signed [OUT_W-1:0]  out_q;

  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'(2**(OUT_W-1) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(2**(OUT_W-1));

  coeff_rom #(.DEPTH(DEPTH), .LAYER(LAYER), .NEURON(NEURON)) u_rom (
    .addr (addr),
    .coeff(coeff)
  );

  mac_unit #(.DIGIT(DIGIT), .W_W(COEF_W), .D_W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .acc_init(ACC_W'(bias_q) <<< BIAS_SHIFT),
    .issue   (issue),
    .w       (coeff),
    .d       (data),
    .ready   (ready),
    .idle    (idle),
    .acc     (acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bias_q <= BIAS;
      out_q  <= '0;
      sat    <= 1'b0;
    end else if (capture) begin
      if (acc > OUT_MAX) begin
        out_q <= OUT_MAX[OUT_W-1:0];
        sat   <= 1'b1;
      end else if (acc < OUT_MIN) begin
        out_q <= OUT_MIN[OUT_W-1:0];
        sat   <= 1'b1;
      end else begin
        out_q <= acc[OUT_W-1:0];
        sat   <= 1'b0;
      end
    end
  end

  assign bus_out = bus_sel ? out_q : '0;

endmodule
