// fir_layer: one layer of the FIR neural network.
//
// Each of the CH input channels has a tapped delay line of TAPS samples; a
// channel's line advances when a new value is written to it (in_valid,
// in_ch, in_data). On 'start' the layer controller walks all CH*TAPS
// connections: the address generator selects a channel and tap, that one
// data word is broadcast to all NEURONS neurons in parallel, and each neuron
// multiplies it with its own coefficient and accumulates. Then the neurons
// put their sums on the shared output bus one after another; the bus
// addresses the layer's single sigmoid table, and each result leaves as
// out_valid / out_idx / out_data (Q0.8). 'done' pulses with the last result.
// sat_count counts captures that saturated to the 16-bit output range.
// The structure (delay lines, broadcast data word, per-neuron MAC and ROM,
// shared bus to one sigmoid generator) follows the source; the handshakes
// are this design's. All neurons run in lockstep, so only neuron 0's ready
// and idle are used by the controller (the others' are left unread).
module fir_layer
  import fir_nn_pkg::*;
#(
  parameter int LAYER   = 1,
  parameter int CH      = 1,
  parameter int TAPS    = 20,
  parameter int NEURONS = 10
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          in_valid,
  input  logic [$clog2(CH > 1 ? CH : 2)-1:0]            in_ch,
  input  logic [DATA_W-1:0]                             in_data,
  input  logic                                          start,
  output logic                                          busy,
  output logic                                          done,
  output logic                                          out_valid,
  output logic [$clog2(NEURONS > 1 ? NEURONS : 2)-1:0]  out_idx,
  output logic [DATA_W-1:0]                             out_data,
  output logic [7:0]                                    sat_count
);

  localparam int DEPTH = CH * TAPS;
  localparam int AW    = $clog2(DEPTH > 1 ? DEPTH : 2);
  localparam int CW    = $clog2(CH > 1 ? CH : 2);
  localparam int TW    = $clog2(TAPS > 1 ? TAPS : 2);

  logic [AW-1:0]     addr;
  logic [CW-1:0]     ch;
  logic [TW-1:0]     tap;
  logic              addr_last, addr_clear, addr_step;
  logic              load, issue, capture, sig_en;
  logic [NEURONS-1:0] bus_sel;
  logic [DATA_W-1:0] line_out [CH];
  logic [DATA_W-1:0] data_word;
  logic [NEURONS-1:0] n_ready, n_idle, n_sat;
  logic signed [OUT_W-1:0] n_bus [NEURONS];
  logic signed [OUT_W-1:0] bus;
  logic              capture_q;

  for (genvar c = 0; c < CH; c++) begin : g_line
    tap_delay_line #(.TAPS(TAPS), .DW(DATA_W)) u_line (
      .clk  (clk),
      .rst_n(rst_n),
      .shift(in_valid && int'(in_ch) == c),
      .din  (in_data),
      .sel  (tap),
      .dout (line_out[c])
    );
  end

  assign data_word = line_out[ch];

  address_generator #(.CH(CH), .TAPS(TAPS)) u_agen (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(addr_clear),
    .step (addr_step),
    .addr (addr),
    .ch   (ch),
    .tap  (tap),
    .last (addr_last)
  );

  layer_controller #(.NEURONS(NEURONS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mac_ready (n_ready[0]),
    .mac_idle  (n_idle[0]),
    .addr_last (addr_last),
    .addr_clear(addr_clear),
    .addr_step (addr_step),
    .load      (load),
    .issue     (issue),
    .capture   (capture),
    .bus_sel   (bus_sel),
    .sig_en    (sig_en),
    .out_valid (out_valid),
    .out_idx   (out_idx),
    .busy      (busy),
    .done      (done)
  );

  for (genvar n = 0; n < NEURONS; n++) begin : g_neuron
    fir_neuron #(.LAYER(LAYER), .NEURON(n), .DEPTH(DEPTH)) u_neuron (
      .clk    (clk),
      .rst_n  (rst_n),
      .addr   (addr),
      .data   (data_word),
      .load   (load),
      .issue  (issue),
      .capture(capture),
      .bus_sel(bus_sel[n]),
      .ready  (n_ready[n]),
      .idle   (n_idle[n]),
      .bus_out(n_bus[n]),
      .sat    (n_sat[n])
    );
  end

  // Shared output bus: OR of the gated neuron outputs.
  always_comb begin
    bus = '0;
    for (int n = 0; n < NEURONS; n++) bus = bus | n_bus[n];
  end

  sigmoid_lut u_sigmoid (
    .clk(clk),
    .en (sig_en),
    .x  (bus),
    .y  (out_data)
  );

  // Count saturated captures (status only).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      capture_q <= 1'b0;
      sat_count <= '0;
    end else begin
      capture_q <= capture;
      if (capture_q) sat_count <= sat_count + 8'($countones(n_sat));
    end
  end

  a_onehot_bus: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bus_sel));
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !busy || done);

endmodule
