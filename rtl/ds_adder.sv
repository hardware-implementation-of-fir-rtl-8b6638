// ds_adder: digit-serial adder.
//
// Two operands arrive one DIGIT-bit digit per clock, least significant digit
// first. The digit is added by a ripple of DIGIT full adders (combinational
// sum output); the carry out of the top full adder is stored in a register
// and enters the bottom full adder with the next digit. This is the structure
// of the classic digit-serial adder (digit size 2 by default).
//
// Interface: 'en' marks a cycle that carries a digit; only then is the carry
// register updated. 'first' marks the least significant digit of a word and
// forces the carry in to 0, so words can follow each other back to back
// (the word framing is this design's choice).
// Timing: sum is combinational from a, b, first and the carry register.
module ds_adder #(
  parameter int DIGIT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             first,
  input  logic [DIGIT-1:0] a,
  input  logic [DIGIT-1:0] b,
  output logic [DIGIT-1:0] sum
);

  logic carry_q;
  logic carry_in;
  logic carry_out;

  assign carry_in = first ? 1'b0 : carry_q;

  // Ripple of DIGIT full adders.
  always_comb begin
    logic c;
    c = carry_in;
    for (int i = 0; i < DIGIT; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
    end
    carry_out = c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  carry_q <= 1'b0;
    else if (en) carry_q <= carry_out;
  end

endmodule
