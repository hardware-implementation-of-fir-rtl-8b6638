// tb_layer_controller: drives the controller of a 3-neuron layer against a
// simple MAC and address-counter model (5 addresses, each word busy for 4
// clocks, 3 more clocks of pipeline drain) and checks the order of events:
// address clear with start, one bias load, exactly 5 issues each taken only
// when the MAC is ready, capture only after the MAC is idle, bus grants
// one-hot to neurons 0,1,2 on consecutive clocks with the sigmoid enabled,
// results flagged one clock later with the right index, and 'done' with the
// last result.
module tb_layer_controller;
  localparam int NEURONS = 3, DEPTH = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic mac_ready, mac_idle, addr_last;
  logic addr_clear, addr_step, load, issue, capture, sig_en, out_valid, busy, done;
  logic [NEURONS-1:0] bus_sel;
  logic [1:0] out_idx;
  int checks = 0, failures = 0;

  layer_controller #(.NEURONS(NEURONS)) dut (.*);

  always #5 clk = ~clk;

  // MAC and address generator model.
  int word_cnt = 0, drain = 0, addr = 0;
  assign mac_ready = (word_cnt <= 1);
  assign mac_idle  = (word_cnt == 0) && (drain == 0);
  assign addr_last = (addr == DEPTH - 1);
  always @(posedge clk) begin
    if (issue && mac_ready) begin word_cnt <= 4; drain <= 3; end
    else if (word_cnt > 0) word_cnt <= word_cnt - 1;
    else if (drain > 0) drain <= drain - 1;
    if (addr_clear) addr <= 0;
    else if (addr_step && addr < DEPTH - 1) addr <= addr + 1;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_load, n_issue, n_capt, n_out, grant_idx, n_grant, n_done;
  logic [NEURONS-1:0] last_sel;
  always @(posedge clk) if (rst_n) begin
    if (load) n_load++;
    if (issue) begin
      n_issue++;
      checks++;
      if (!mac_ready) begin failures++; $display("issue while not ready"); end
    end
    if (capture) begin
      n_capt++;
      checks += 2;
      if (!mac_idle) begin failures++; $display("capture before idle"); end
      if (n_issue != DEPTH) begin failures++; $display("capture after %0d issues", n_issue); end
    end
    if (bus_sel != 0) begin
      checks += 2;
      if (bus_sel != (NEURONS'(1) << n_grant)) begin failures++; $display("grant %b", bus_sel); end
      if (!sig_en) begin failures++; $display("sigmoid not enabled"); end
      n_grant++;
    end
    if (out_valid) begin
      checks++;
      if (int'(out_idx) != n_out || last_sel != (NEURONS'(1) << n_out)) begin
        failures++; $display("result index %0d", out_idx);
      end
      n_out++;
    end
    if (done) begin
      n_done++;
      checks++;
      if (!(out_valid && n_out == NEURONS)) begin failures++; $display("done not with last result"); end
    end
    last_sel <= bus_sel;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 4; r++) begin
      n_load = 0; n_issue = 0; n_capt = 0; n_out = 0; n_grant = 0; n_done = 0;
      @(negedge clk);
      start = 1;
      #1;
      checks++;
      if (!addr_clear) begin failures++; $display("no address clear on start"); end
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      checks += 6;
      if (n_load != 1)       begin failures++; $display("loads %0d", n_load); end
      if (n_issue != DEPTH)  begin failures++; $display("issues %0d", n_issue); end
      if (n_capt != 1)       begin failures++; $display("captures %0d", n_capt); end
      if (n_grant != NEURONS) begin failures++; $display("grants %0d", n_grant); end
      if (n_out != NEURONS)  begin failures++; $display("results %0d", n_out); end
      if (n_done != 1)       begin failures++; $display("done %0d", n_done); end
      repeat (r) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
