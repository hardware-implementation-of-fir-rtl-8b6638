// sigmoid_lut: sigmoid generator as a look-up table.
//
// Maps a neuron's 16-bit output register x (signed, Q3.12, range [-8, 8))
// to f(x) = 1 / (1 + exp(-x)) as an 8-bit unsigned fraction (Q0.8). The
// table has 256 entries indexed by the upper byte of x, i.e. x in steps of
// 1/16; the index is that byte with its sign bit inverted (offset binary).
// Entry i holds min(255, round(256 / (1 + exp(-(i - 128) / 16)))), slope 1;
// the table is loaded from sigmoid_lut.hex at start-up, as an FPGA ROM is
// loaded with the configuration bitstream.
// The low byte of x is below the table's resolution and is not used.
// Timing: synchronous read; with 'en' high, y is valid on the next clock.
// Using a table follows the source; its size and formats are this design's.
module sigmoid_lut (
  input  logic               clk,
  input  logic               en,
  input  logic signed [15:0] x,
  output logic        [7:0]  y
);

  logic [7:0] table_q [256];

  initial $readmemh("rtl/sigmoid_lut.hex", table_q);

  always_ff @(posedge clk) begin
    if (en) y <= table_q[{~x[15], x[14:8]}];
  end

endmodule
