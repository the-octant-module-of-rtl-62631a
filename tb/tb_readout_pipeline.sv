// tb_readout_pipeline: self-checking test of the Level-1 pipeline and the
// derandomizer. One crossing is written every four clocks with random sector
// words, bunch number and error bits, all kept in a model history. Level-1
// Accepts come at random, never while busy, under several latencies and
// windows (0..2 crossings before and after). Every derandomizer frame is
// checked against the model: the crossing it must hold, first/last tags,
// position in the window and event number. The event number must restart
// after ecr. A phase in which nobody reads the derandomizer must raise busy.
module tb_readout_pipeline;
  import mioct_pkg::*;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, l1a = 0, ecr = 0;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] wr_data = '0;
  logic [11:0] wr_bcid = '0;
  logic [N_SECTORS-1:0] wr_bcid_err = '0;
  logic [7:0] l1_latency = 8'd10;
  logic [1:0] win_pre = 0, win_post = 0;
  frame_t fr_dout;
  logic fr_empty, fr_pop, busy;
  logic [23:0] l1id;
  int checks = 0, failures = 0;

  typedef struct {
    int crossing;
    int len;
    int l1id;
  } exp_ev_t;
  exp_ev_t pend [$];
  logic [N_SECTORS-1:0][SECTOR_W-1:0] h_data [int];
  logic [11:0] h_bcid [int];
  logic [N_SECTORS-1:0] h_err [int];
  int k = 0;           // crossing being written
  int ev_no = 0;
  int fidx = 0;        // frame index inside the current event
  int n_frames = 0, n_busy = 0, n_ev = 0;
  bit reading = 1;

  readout_pipeline #(.L1_DEPTH(256), .DERAND_DEPTH(32), .REQ_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // derandomizer reader and checker
  assign fr_pop = reading && !fr_empty;
  always @(negedge clk) if (rst_n) begin
    if (busy) n_busy++;
    if (fr_pop) begin
      if (pend.size() == 0) check(0, "frame without an L1A");
      else begin
        int c;
        c = pend[0].crossing + fidx;
        check(fr_dout.data == h_data[c] && fr_dout.bcid == h_bcid[c] && fr_dout.bcid_err == h_err[c],
              $sformatf("frame data of crossing %0d", c));
        check(fr_dout.first == (fidx == 0) && fr_dout.last == (fidx == pend[0].len - 1) && int'(fr_dout.win) == fidx,
              "frame tags");
        check(int'(fr_dout.l1id) == pend[0].l1id, $sformatf("event number %0d expected %0d", fr_dout.l1id, pend[0].l1id));
        n_frames++;
        fidx++;
        if (fidx == pend[0].len) begin
          fidx = 0;
          void'(pend.pop_front());
          n_ev++;
        end
      end
    end
  end

  // one crossing per four clocks
  task automatic crossing(bit trig);
    @(negedge clk);
    wr_valid = 1;
    wr_data  = '0;
    for (int s = 0; s < N_SECTORS; s++) wr_data[s] = $urandom;
    wr_bcid  = 12'($urandom);
    wr_bcid_err = 13'($urandom);
    h_data[k] = wr_data;
    h_bcid[k] = wr_bcid;
    h_err[k]  = wr_bcid_err;
    l1a = trig && !busy;
    if (l1a) begin
      exp_ev_t e;
      e.crossing = k - int'(l1_latency) - int'(win_pre);
      e.len      = int'(win_pre) + int'(win_post) + 1;
      e.l1id     = ev_no++;
      pend.push_back(e);
    end
    @(negedge clk);
    wr_valid = 0;
    l1a = 0;
    repeat (2) @(negedge clk);
    k++;
  endtask

  task automatic drain();
    while (pend.size() != 0) crossing(0);
  endtask

  initial begin
    int lat [3] = '{5, 60, 120};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (130) crossing(0);
    for (int p = 0; p < 3; p++)
      for (int w = 0; w < 5; w++) begin
        drain();
        l1_latency = 8'(lat[p]);
        win_pre  = 2'((w == 1 || w == 3) ? 1 : (w >= 2 ? 2 : 0));
        win_post = 2'((w == 4) ? 1 : (w == 2 ? 2 : (w == 3 ? 0 : w)));
        repeat (60) crossing(($urandom % 5) == 0);
        if (p == 1 && w == 2) begin
          // event counter reset
          drain();
          @(negedge clk);
          ecr = 1;
          @(negedge clk);
          ecr = 0;
          ev_no = 0;
          check(l1id == 0, "ecr clears the event number");
        end
      end
    // nobody reads: the derandomizer fills and busy must rise
    drain();
    win_pre = 2; win_post = 2; l1_latency = 8'd20;
    reading = 0;
    repeat (100) crossing(1);
    check(n_busy > 0, "busy raised with a full derandomizer");
    reading = 1;
    drain();
    repeat (10) crossing(0);
    check(pend.size() == 0, "all events read out");
    $display("events %0d, frames %0d, busy clocks %0d", n_ev, n_frames, n_busy);
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
