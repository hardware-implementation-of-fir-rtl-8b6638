// ds_pipelined_mult: digit-serial pipelined (systolic) multiplier, 8 x 8 by
// default.
//
// The multiplier X (a filter weight) enters one DIGIT-bit digit per clock,
// least significant digit first, as a two's-complement word sign-extended to
// WORD_DIGITS digits. The multiplicand Y (a data word) is a parallel input.
// Row 0 is a rank of AND gates forming Y[0] AND X; rows 1..YW-1 are digit-
// serial multiplier modules (ds_mult_module) chained in a systolic array.
// Row j adds Y[j] * (X << j) to the partial sum coming from row j-1. The X
// stream is shifted left by one bit between rows and registered together
// with the partial sum, so every row sees both streams aligned; a 'first'
// flag travels with the data and restarts each row's carry at a word
// boundary. The result leaves as the digit stream of (X * Y) modulo
// 2^(DIGIT*WORD_DIGITS), which is the exact signed product when it fits.
// Y is treated as unsigned (data words are non-negative in this network).
//
// Timing: latency YW-1 clocks (one register per module), a new word may
// start every WORD_DIGITS clocks, back to back. Each row samples its Y bit
// when the word's first digit reaches it, so Y must be held from the first
// digit for YW-1 clocks (the MAC unit holds it for a whole word).
// The row structure and the digit-serial LSD-first / parallel split follow
// the classic design; word framing, signedness and the Y sampling are this
// design's choices. DIGIT must be at least 2.
module ds_pipelined_mult #(
  parameter int DIGIT       = 2,
  parameter int YW          = 8,
  parameter int WORD_DIGITS = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIGIT-1:0] x_digit,
  input  logic             x_first,
  input  logic             x_valid,
  input  logic [YW-1:0]    y,
  output logic [DIGIT-1:0] p_digit,
  output logic             p_first,
  output logic             p_valid,
  output logic             busy
);

  logic [DIGIT-1:0] xs    [YW];
  logic [DIGIT-1:0] ss    [YW];
  logic             fs    [YW];
  logic             vs    [YW];
  logic             xmsb_q;
  logic [YW-1:0]    vmask;

  // Row 0: AND gates, plus the one-bit shift of X for row 1.
  always_ff @(posedge clk) begin
    if (!rst_n)       xmsb_q <= 1'b0;
    else if (x_valid) xmsb_q <= x_digit[DIGIT-1];
  end

  assign ss[0] = x_digit & {DIGIT{y[0]}};
  assign xs[0] = {x_digit[DIGIT-2:0], (x_first ? 1'b0 : xmsb_q)};
  assign fs[0] = x_first & x_valid;
  assign vs[0] = x_valid;

  // Rows 1..YW-1: digit-serial multiplier modules.
  for (genvar j = 1; j < YW; j++) begin : g_row
    logic [DIGIT-1:0] x_shifted;
    ds_mult_module #(.DIGIT(DIGIT)) u_dsmm (
      .clk      (clk),
      .rst_n    (rst_n),
      .y_in     (y[j]),
      .x_in     (xs[j-1]),
      .s_in     (ss[j-1]),
      .first_in (fs[j-1]),
      .valid_in (vs[j-1]),
      .x_out    (x_shifted),
      .s_out    (ss[j]),
      .first_out(fs[j]),
      .valid_out(vs[j])
    );
    assign xs[j] = x_shifted;
  end

  assign p_digit = ss[YW-1];
  assign p_first = fs[YW-1];
  assign p_valid = vs[YW-1];

  always_comb begin
    for (int j = 0; j < YW; j++) vmask[j] = vs[j];
  end
  assign busy = |vmask;

  // A word must be WORD_DIGITS digits long: 'first' may only follow a
  // complete word. Checked at the input.
  int unsigned in_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) in_cnt <= 0;
    else if (x_valid) in_cnt <= x_first ? 1 : in_cnt + 1;
  end
  a_word_len: assert property (@(posedge clk) disable iff (!rst_n)
                               (x_valid && x_first && in_cnt != 0) |-> in_cnt == WORD_DIGITS);

endmodule
