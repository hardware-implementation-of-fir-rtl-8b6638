// mac_unit: digit-serial multiply-accumulate unit of one neuron.
//
// On 'issue' the weight w and the data word d are captured in the input
// register (the 8+8-bit operand register of the neuron; the weight is kept
// sign-extended to ACC_W bits so it can be shifted out). It is streamed one
// DIGIT-bit digit per clock (least significant first) into the pipelined
// digit-serial multiplier, with d as its parallel multiplicand. The product
// digits that leave the multiplier are added by a digit-serial adder to the
// accumulator, which is held as a circulating shift register of ACC_W/DIGIT
// digits: each product digit is added to the digit leaving the bottom of the
// register and the sum enters at the top, so after one word the register is
// aligned again and holds acc + w*d. 'load' (Load/Clear) preloads the
// accumulator with acc_init, used for the neuron's bias.
//
// Interface: issue is taken when 'ready' is high; a new word may be issued in
// the last digit cycle of the previous one, so words run back to back, one
// every ACC_W/DIGIT clocks. 'idle' is high when no word is being streamed or
// is inside the multiplier; 'acc' is then the final sum. 'load' must only be
// raised while idle. The 18-bit accumulator wraps on overflow.
// The multiplier-adder-accumulator arrangement with a shift-register
// accumulator follows the classic digit-serial MAC; the widths 8/8/18 follow
// the source; framing and handshake are this design's.
module mac_unit #(
  parameter int DIGIT = 2,
  parameter int W_W   = 8,
  parameter int D_W   = 8,
  parameter int ACC_W = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [ACC_W-1:0] acc_init,
  input  logic                    issue,
  input  logic signed [W_W-1:0]   w,
  input  logic        [D_W-1:0]   d,
  output logic                    ready,
  output logic                    idle,
  output logic signed [ACC_W-1:0] acc
);

  localparam int ND = ACC_W / DIGIT;   // digits per word

  // Input register: weight (kept sign-extended for streaming) and data word.
  logic        [D_W-1:0] d_q;
  logic [ACC_W-1:0]      wsh_q;        // weight being streamed out
  logic                  active;
  logic [$clog2(ND)-1:0] cnt;

  logic [DIGIT-1:0] p_digit;
  logic             p_first;
  logic             p_valid;
  logic             m_busy;

  logic [DIGIT-1:0] acc_sr [ND];
  logic [DIGIT-1:0] acc_sum;

  assign ready = !active || (cnt == $bits(cnt)'(ND - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q    <= '0;
      wsh_q  <= '0;
      active <= 1'b0;
      cnt    <= '0;
    end else if (issue && ready) begin
      d_q    <= d;
      wsh_q  <= ACC_W'(w);             // sign extension
      active <= 1'b1;
      cnt    <= '0;
    end else if (active) begin
      wsh_q  <= wsh_q >> DIGIT;
      if (cnt == $bits(cnt)'(ND - 1)) active <= 1'b0;
      else                            cnt    <= cnt + 1'b1;
    end
  end

  ds_pipelined_mult #(.DIGIT(DIGIT), .YW(D_W), .WORD_DIGITS(ND)) u_mult (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_digit(wsh_q[DIGIT-1:0]),
    .x_first(active && cnt == '0),
    .x_valid(active),
    .y      (d_q),
    .p_digit(p_digit),
    .p_first(p_first),
    .p_valid(p_valid),
    .busy   (m_busy)
  );

  ds_adder #(.DIGIT(DIGIT)) u_acc_add (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (p_valid),
    .first(p_first),
    .a    (acc_sr[0]),
    .b    (p_digit),
    .sum  (acc_sum)
  );

  // Accumulator shift register (bottom digit = least significant).
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < ND; k++) acc_sr[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < ND; k++) acc_sr[k] <= acc_init[k*DIGIT +: DIGIT];
    end else if (p_valid) begin
      for (int k = 0; k < ND - 1; k++) acc_sr[k] <= acc_sr[k+1];
      acc_sr[ND-1] <= acc_sum;
    end
  end

  always_comb begin
    for (int k = 0; k < ND; k++) acc[k*DIGIT +: DIGIT] = acc_sr[k];
  end

  assign idle = !active && !m_busy;

  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> idle);

endmodule
