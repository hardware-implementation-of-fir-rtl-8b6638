// address_generator: coefficient address generator of a layer.
//
// Walks the CH*TAPS connections of a layer in channel-major order and gives,
// for the current step, the coefficient ROM address (ch*TAPS + tap) and the
// channel and tap used to read the input delay lines. 'clear' returns to
// address 0, 'step' advances; 'last' marks the final address. Registered
// counters, updated on the clock edge.
module address_generator #(
  parameter int CH   = 1,
  parameter int TAPS = 20
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         clear,
  input  logic                                         step,
  output logic [$clog2(CH*TAPS > 1 ? CH*TAPS : 2)-1:0] addr,
  output logic [$clog2(CH > 1 ? CH : 2)-1:0]           ch,
  output logic [$clog2(TAPS > 1 ? TAPS : 2)-1:0]       tap,
  output logic                                         last
);

  assign last = (int'(ch) == CH - 1) && (int'(tap) == TAPS - 1);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      addr <= '0;
      ch   <= '0;
      tap  <= '0;
    end else if (step && !last) begin
      addr <= addr + 1'b1;
      if (int'(tap) == TAPS - 1) begin
        tap <= '0;
        ch  <= ch + 1'b1;
      end else begin
        tap <= tap + 1'b1;
      end
    end
  end

endmodule
