// tb_sync_fifo: self-checking test of the synchronous first-word-fall-through
// FIFO. Random pushes and pops (including pushes while full and pops while
// empty, which must be ignored) are compared against a queue model: head word,
// empty, full and fill level are checked after every clock. A small depth
// keeps the full condition frequent.
module tb_sync_fifo;
  localparam int WIDTH = 36;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_pop = 0, n_full_push = 0;
  logic [WIDTH-1:0] model [$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 70 : 30;   // alternate filling and draining phases
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(dout == model[0], $sformatf("head %h expected %h", dout, model[0]));
      if (full) n_full++;
      push = (($urandom % 100) < bias);
      pop  = (($urandom % 100) < 100 - bias);
      din  = {$urandom, 4'($urandom)};
      if (push && model.size() == DEPTH) n_full_push++;
      if (pop && model.size() == 0) n_empty_pop++;
      @(posedge clk);
      #1;
      // model update, using the state before the edge
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == DEPTH);
        was_empty = (model.size() == 0);
        if (pop && !was_empty) void'(model.pop_front());
        if (push && !was_full) model.push_back(din);
      end
    end
    $display("full cycles %0d, pushes while full %0d, pops while empty %0d", n_full, n_full_push, n_empty_pop);
    if (n_full == 0 || n_full_push == 0 || n_empty_pop == 0) begin
      failures++;
      $display("FAIL: a FIFO condition was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
