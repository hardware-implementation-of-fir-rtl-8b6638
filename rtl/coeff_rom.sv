// coeff_rom: filter coefficient ROM local to one neuron.
//
// Holds one 8-bit coefficient (Q3.4) for every connection of the neuron to
// the previous layer, addressed channel * TAPS + tap, as DEPTH words. The
// contents are computed at elaboration from fir_nn_pkg::init_coeff(LAYER,
// NEURON, addr); they stand in for trained coefficients. Read is
// asynchronous (combinational), like a look-up-table ROM in an FPGA.
module coeff_rom
  import fir_nn_pkg::*;
#(
  parameter int DEPTH  = 20,
  parameter int LAYER  = 1,
  parameter int NEURON = 0
) (
  input  logic [$clog2(DEPTH > 1 ? DEPTH : 2)-1:0] addr,
  output logic signed [COEF_W-1:0]                coeff
);

  function automatic logic [DEPTH*COEF_W-1:0] rom_init();
    logic [DEPTH*COEF_W-1:0] r;
    for (int a = 0; a < DEPTH; a++) r[a*COEF_W +: COEF_W] = init_coeff(LAYER, NEURON, a);
    return r;
  endfunction

  localparam logic [DEPTH*COEF_W-1:0] ROM = rom_init();

  always_comb begin
    coeff = '0;
    if (int'(addr) < DEPTH) coeff = ROM[addr*COEF_W +: COEF_W];
  end

endmodule
