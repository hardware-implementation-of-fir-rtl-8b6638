// ds_mult_module: one digit-serial multiplier module (DSMM), a row of the
// systolic digit-serial multiplier.
//
// The row owns one multiplicand bit Y. Each clock it receives a digit of the
// multiplier stream X (already weighted for this row) and a digit of the
// partial sum In. The partial-product digit Y AND X is added to In by a
// digit-serial adder; the sum digit is registered (output O). The X digit is
// passed on to the next row through one register, shifted left by one bit:
// a one-bit register keeps the upper bit of the previous digit and becomes
// the lower bit of the outgoing digit, so the next row sees X weighted by two.
// The AND gates, the digit adder and the output register follow the classic
// DSMM cell; the one-bit shift register in the X path is this design's
// reading of the two delays drawn on each X bit.
//
// Y is sampled when the first digit of a word reaches this row, so the
// parallel multiplicand may change for the next word while this one is
// still travelling down the array.
// Timing: every output is registered, one clock after its input.
module ds_mult_module #(
  parameter int DIGIT = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             y_in,
  input  logic [DIGIT-1:0] x_in,
  input  logic [DIGIT-1:0] s_in,
  input  logic             first_in,
  input  logic             valid_in,
  output logic [DIGIT-1:0] x_out,
  output logic [DIGIT-1:0] s_out,
  output logic             first_out,
  output logic             valid_out
);

  logic             y_q;
  logic             y_eff;
  logic             xmsb_q;
  logic [DIGIT-1:0] pp;
  logic [DIGIT-1:0] sum;
  logic [DIGIT-1:0] x_shl;

  assign y_eff = first_in ? y_in : y_q;
  assign pp    = x_in & {DIGIT{y_eff}};
  // X shifted left by one bit: carry in the top bit of the previous digit.
  assign x_shl = {x_in[DIGIT-2:0], (first_in ? 1'b0 : xmsb_q)};

  ds_adder #(.DIGIT(DIGIT)) u_add (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (valid_in),
    .first(first_in),
    .a    (s_in),
    .b    (pp),
    .sum  (sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_q       <= 1'b0;
      xmsb_q    <= 1'b0;
      x_out     <= '0;
      s_out     <= '0;
      first_out <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      first_out <= first_in & valid_in;
      if (valid_in) begin
        y_q    <= y_eff;
        xmsb_q <= x_in[DIGIT-1];
        x_out  <= x_shl;
        s_out  <= sum;
      end
    end
  end

endmodule
