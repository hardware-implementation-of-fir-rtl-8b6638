// fir_nn_top: FIR neural network for time series prediction, topology
// 1:10:10:1 with 20:4:4 taps per synapse.
//
// Every synapse of the network is an FIR filter: hidden layer 1 sees the
// last TAPS1 input samples, hidden layer 2 the last TAPS2 outputs of each
// hidden-1 neuron, and the output neuron the last TAPS3 outputs of each
// hidden-2 neuron. For each input sample (x_valid while x_ready) the three
// layers run one after another: the sample enters layer 1's delay line and
// layer 1 starts; each result layer 1 puts on its output bus is written into
// the matching delay line of layer 2; when layer 1 is done layer 2 starts,
// and so on. The output neuron's sigmoid value is the prediction y_data,
// flagged by a one-clock y_valid; x_ready rises one clock later. From
// acceptance of a sample to its prediction takes 957 clocks.
// Samples and predictions are 8-bit unsigned fractions (Q0.8).
// sat_count counts (saturating at 255) the neuron sums that were clipped to
// the 16-bit range before the sigmoid.
// Topology, tap counts and widths follow the source; running the layers in
// sequence and the sample handshake are this design's choices.
module fir_nn_top
  import fir_nn_pkg::*;
#(
  parameter int N_H1  = 10,
  parameter int N_H2  = 10,
  parameter int TAPS1 = 20,
  parameter int TAPS2 = 4,
  parameter int TAPS3 = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              x_valid,
  input  logic [DATA_W-1:0] x_data,
  output logic              x_ready,
  output logic              y_valid,
  output logic [DATA_W-1:0] y_data,
  output logic [7:0]        sat_count
);

  localparam int W1 = $clog2(N_H1 > 1 ? N_H1 : 2);
  localparam int W2 = $clog2(N_H2 > 1 ? N_H2 : 2);

  logic              busy_q;
  logic              l1_start, l1_busy, l1_done, l1_valid;
  logic              l2_busy, l2_done, l2_valid;
  logic              l3_busy, l3_done;
  logic [W1-1:0]     l1_idx;
  logic [W2-1:0]     l2_idx;
  logic [DATA_W-1:0] l1_data, l2_data;
  logic [7:0]        l1_sat, l2_sat, l3_sat;
  logic [9:0]        sat_sum;

  assign x_ready  = !busy_q;
  assign l1_start = x_ready && x_valid;

  always_ff @(posedge clk) begin
    if (!rst_n)        busy_q <= 1'b0;
    else if (l1_start) busy_q <= 1'b1;
    else if (l3_done)  busy_q <= 1'b0;
  end

  fir_layer #(.LAYER(1), .CH(1), .TAPS(TAPS1), .NEURONS(N_H1)) u_l1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (l1_start),
    .in_ch    ('0),
    .in_data  (x_data),
    .start    (l1_start),
    .busy     (l1_busy),
    .done     (l1_done),
    .out_valid(l1_valid),
    .out_idx  (l1_idx),
    .out_data (l1_data),
    .sat_count(l1_sat)
  );

  fir_layer #(.LAYER(2), .CH(N_H1), .TAPS(TAPS2), .NEURONS(N_H2)) u_l2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (l1_valid),
    .in_ch    (l1_idx),
    .in_data  (l1_data),
    .start    (l1_done),
    .busy     (l2_busy),
    .done     (l2_done),
    .out_valid(l2_valid),
    .out_idx  (l2_idx),
    .out_data (l2_data),
    .sat_count(l2_sat)
  );

  fir_layer #(.LAYER(3), .CH(N_H2), .TAPS(TAPS3), .NEURONS(1)) u_l3 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (l2_valid),
    .in_ch    (l2_idx),
    .in_data  (l2_data),
    .start    (l2_done),
    .busy     (l3_busy),
    .done     (l3_done),
    .out_valid(y_valid),
    .out_idx  (),
    .out_data (y_data),
    .sat_count(l3_sat)
  );

  assign sat_sum   = 10'(l1_sat) + 10'(l2_sat) + 10'(l3_sat);
  assign sat_count = (sat_sum > 10'd255) ? 8'd255 : sat_sum[7:0];

  a_one_layer: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({l1_busy && !l1_done, l2_busy && !l2_done, l3_busy && !l3_done}));

endmodule
