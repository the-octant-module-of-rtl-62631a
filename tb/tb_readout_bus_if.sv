// tb_readout_bus_if: self-checking test of the token-passing readout bus
// sender. Random events (header, candidate words, trailer) are written into a
// readout FIFO at random times; tokens arrive at random times, sometimes
// before any complete event is stored. Checks: each token moves exactly one
// whole event onto the bus, in order and word for word; ro_oe covers every
// valid word; the token is passed on once per event, right after its trailer;
// nothing is driven without a token.
module tb_readout_bus_if;
  import mioct_pkg::*;

  logic clk = 0, rst_n = 0;
  logic push = 0;
  logic [RO_W-1:0] din = '0, fifo_dout;
  logic fifo_empty, fifo_full, fifo_pop;
  logic [9:0] fifo_count;
  logic ev_pushed = 0, token_in = 0, token_out;
  logic [RO_W-1:0] ro_data;
  logic ro_valid, ro_oe;
  int checks = 0, failures = 0;
  int n_tok = 0, n_wait = 0;
  logic [RO_W-1:0] sent [$], got [$];
  bit holding = 0;
  int ev_got = 0;

  sync_fifo #(.WIDTH(RO_W), .DEPTH(512)) u_fifo (
    .clk, .rst_n, .push, .din, .pop(fifo_pop), .dout(fifo_dout),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count));

  readout_bus_if dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // producer: whole events with a gap between them
  initial begin
    @(posedge rst_n);
    for (int e = 0; e < 60; e++) begin
      int n;
      n = $urandom % 6;
      repeat ($urandom % 40) @(negedge clk);
      for (int w = 0; w < n + 2; w++) begin
        @(negedge clk);
        push = 1;
        if (w == 0)          din = {RO_HEADER, 9'b0, 24'(e)};
        else if (w == n + 1) din = {RO_TRAILER, 21'b0, 12'(n + 2)};
        else                 din = {RO_CAND, 33'($urandom)};
        ev_pushed = (w == n + 1);
        sent.push_back(din);
      end
      @(negedge clk);
      push = 0;
      ev_pushed = 0;
    end
  end

  // token source: a new token only after the previous one came back
  initial begin
    @(posedge rst_n);
    repeat (200) @(negedge clk);
    while (ev_got < 60) begin
      repeat ($urandom % 20) @(negedge clk);
      if (fifo_empty) n_wait++;
      token_in = 1;
      holding  = 1;
      n_tok++;
      @(negedge clk);
      token_in = 0;
      while (holding) @(negedge clk);
    end
  end

  // bus monitor
  int words_this_token = 0;
  always @(posedge clk) if (rst_n) begin
    if (ro_valid) begin
      got.push_back(ro_data);
      words_this_token++;
      check(ro_oe, "valid word without ro_oe");
      check(holding, "word driven without a token");
    end
    if (token_out) begin
      check(words_this_token > 0, "token returned with no event");
      check(got.size() > 0 && got[$][RO_W-1 -: 3] == RO_TRAILER, "token returned before the trailer");
      check(got.size() >= words_this_token && got[got.size() - words_this_token][RO_W-1 -: 3] == RO_HEADER,
            "one token did not carry exactly one event");
      ev_got++;
      words_this_token = 0;
      holding <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ev_got == 60);
    repeat (10) @(posedge clk);
    check(got.size() == sent.size(), $sformatf("words %0d expected %0d", got.size(), sent.size()));
    foreach (sent[i]) check(i < got.size() && got[i] == sent[i], $sformatf("word %0d", i));
    $display("tokens %0d, tokens that had to wait for an event %0d", n_tok, n_wait);
    if (n_wait == 0) begin
      failures++;
      $display("FAIL: no token ever waited for an event");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
