// tap_delay_line: tapped delay line of one FIR synapse.
//
// A chain of TAPS unit delays holds the latest samples of one input channel,
// tap m holding x(k-m) for m = 0..TAPS-1. Writing a new sample ('shift')
// moves every sample one place down the chain and puts the new one at tap 0,
// so the line advances once per sample period, as the q^-1 delays of an FIR
// filter do. One tap is read at a time through 'sel' (combinational), because
// the weighted sum y(k) = sum_m h(m) x(k-m) is formed tap by tap by the
// neurons' multiply-accumulate units rather than by one multiplier per tap.
// Reset clears every tap to 0 (this design's choice).
module tap_delay_line #(
  parameter int TAPS = 20,
  parameter int DW   = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             shift,
  input  logic [DW-1:0]                    din,
  input  logic [$clog2(TAPS > 1 ? TAPS : 2)-1:0] sel,
  output logic [DW-1:0]                    dout
);

  logic [DW-1:0] taps_q [TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < TAPS; m++) taps_q[m] <= '0;
    end else if (shift) begin
      taps_q[0] <= din;
      for (int m = 1; m < TAPS; m++) taps_q[m] <= taps_q[m-1];
    end
  end

  assign dout = taps_q[sel];

endmodule
