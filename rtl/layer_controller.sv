// layer_controller: sequencer of one FIR network layer.
//
// For one run of the layer it
//   LOAD    preloads every neuron's accumulator with its bias (Load/Clear),
//   MAC     issues one multiply-accumulate per coefficient address to all
//           neurons at once (Product Select), stepping the address generator
//           each time a MAC accepts a word,
//   DRAIN   waits until the last product has left the pipelined multipliers,
//   CAPTURE copies the accumulators into the neurons' output registers,
//   BUS     grants the shared output bus to the neurons one after another,
//           one per clock, with the sigmoid table enabled; the table's
//           result for neuron i appears one clock later with out_valid and
//           out_idx = i (Read),
//   DONE    pulses 'done' in the cycle of the last result.
// All neurons of a layer work in lockstep, so one neuron's ready/idle stand
// for all. The duties follow the source's controller; the states and their
// timing are this design's.
module layer_controller #(
  parameter int NEURONS = 10
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic                                          start,
  input  logic                                          mac_ready,
  input  logic                                          mac_idle,
  input  logic                                          addr_last,
  output logic                                          addr_clear,
  output logic                                          addr_step,
  output logic                                          load,
  output logic                                          issue,
  output logic                                          capture,
  output logic [NEURONS-1:0]                            bus_sel,
  output logic                                          sig_en,
  output logic                                          out_valid,
  output logic [$clog2(NEURONS > 1 ? NEURONS : 2)-1:0]  out_idx,
  output logic                                          busy,
  output logic                                          done
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_MAC, S_DRAIN, S_CAPT, S_BUS, S_DONE} state_t;

  localparam int IW = $clog2(NEURONS > 1 ? NEURONS : 2);

  state_t        state;
  logic [IW-1:0] idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= (state == S_BUS);
      out_idx   <= idx;
      unique case (state)
        S_IDLE:  if (start) state <= S_LOAD;
        S_LOAD:  state <= S_MAC;
        S_MAC:   if (mac_ready && addr_last) state <= S_DRAIN;
        S_DRAIN: if (mac_idle) state <= S_CAPT;
        S_CAPT: begin
          idx   <= '0;
          state <= S_BUS;
        end
        S_BUS: begin
          if (int'(idx) == NEURONS - 1) state <= S_DONE;
          else                          idx   <= idx + 1'b1;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign addr_clear = (state == S_IDLE) && start;
  assign load       = (state == S_LOAD);
  assign issue      = (state == S_MAC) && mac_ready;
  assign addr_step  = issue;
  assign capture    = (state == S_CAPT);
  assign sig_en     = (state == S_BUS);
  assign busy       = (state != S_IDLE);
  assign done       = (state == S_DONE);

  always_comb begin
    bus_sel = '0;
    if (state == S_BUS) bus_sel[idx] = 1'b1;
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
