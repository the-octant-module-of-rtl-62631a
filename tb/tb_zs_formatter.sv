// tb_zs_formatter: self-checking test of zero suppression and formatting.
// Random events of 1 to 5 crossings (random candidates, about a third
// present, random alignment-error bits) are queued as frames in a
// derandomizer FIFO. The readout FIFO raises full at random. The words
// pushed are compared with a model of the format: header with the first
// crossing's bcid and the event number, one word per candidate with pT /= 0,
// and a trailer with the OR of the error bits and the word count. Events
// offered when the monitoring FIFO lacks room must be skipped whole; the
// others must be copied whole. Without stalls an event must take 26 clocks
// per crossing plus one each for header and trailer.
module tb_zs_formatter;
  import mioct_pkg::*;

  logic clk = 0, rst_n = 0;
  frame_t fr_din, fr_dout;
  logic fr_push = 0, fr_empty, fr_full, fr_pop;
  logic [5:0] fr_count;
  logic ro_push, ro_full = 0, mon_push, ev_done;
  logic [RO_W-1:0] ro_word;
  logic [9:0] mon_free = 10'd512;
  int checks = 0, failures = 0;
  logic [RO_W-1:0] exp_ro [$], exp_mon [$], got_ro [$], got_mon [$];
  int n_ev = 0, n_skip = 0, n_stall = 0, n_done = 0, n_timed = 0;
  bit stall_on = 0;
  int t_head;
  int cur_len = 1;

  sync_fifo #(.WIDTH($bits(frame_t)), .DEPTH(32)) u_derand (
    .clk, .rst_n, .push(fr_push), .din(fr_din), .pop(fr_pop), .dout(fr_dout),
    .empty(fr_empty), .full(fr_full), .count(fr_count));

  zs_formatter #(.MON_AW(9)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // capture what is pushed at the coming edge
  always @(negedge clk) if (rst_n) begin
    if (ro_push) begin
      got_ro.push_back(ro_word);
      if (ro_word[35 -: 3] == RO_HEADER) t_head = cyc;
      if (ro_word[35 -: 3] == RO_TRAILER && !stall_on) begin
        check(cyc - t_head == 26 * cur_len + 1, $sformatf("event took %0d clocks", cyc - t_head + 1));
        n_timed++;
      end
    end
    if (mon_push) got_mon.push_back(ro_word);
    if (ro_full) n_stall++;
    if (ev_done) n_done++;
  end


  // random readout-FIFO full during stall phases
  always @(posedge clk) begin
    #1;
    ro_full <= stall_on && (($urandom % 3) == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 80; e++) begin
      int len, cnt;
      logic [11:0] b0;
      logic [12:0] err;
      bit mon;
      logic [RO_W-1:0] ev [$];
      len = 1 + $urandom % 5;
      ev.delete();
      mon = (e % 5) != 2;
      b0  = 12'($urandom);
      err = '0;
      ev.push_back({RO_HEADER, 1'b0, b0[7:0], 24'(e)});
      cnt = 1;
      // wait until the formatter is idle so mon_free applies to this event
      wait (fr_empty && dut.state == 0);
      @(posedge clk);
      #1;
      mon_free = mon ? 10'd512 : 10'd100;
      stall_on = (e % 4) == 3;
      cur_len = len;
      for (int w = 0; w < len; w++) begin
        frame_t f;
        f.first = (w == 0);
        f.last  = (w == len - 1);
        f.win   = 3'(w);
        f.l1id  = 24'(e);
        f.bcid  = b0 + 12'(w);
        f.bcid_err = (($urandom % 4) == 0) ? 13'($urandom) : '0;
        err |= f.bcid_err;
        for (int s = 0; s < N_SECTORS; s++) f.data[s] = mioct_ref_pkg::rand_sector(35, 256, 3'($urandom));
        for (int c = 0; c < N_CAND; c++) begin
          sector_word_t sw;
          cand_t cd;
          sw = sector_word_t'(f.data[c / 2]);
          cd = (c % 2) ? sw.c1 : sw.c0;
          if (cd.pt != 0) begin
            ev.push_back({RO_CAND, 3'(w), 4'(c / 2), 1'(c % 2), 5'b0, sw.flags, sw.bcid, cd});
            cnt++;
          end
        end
        @(negedge clk);
        fr_din = f;
        fr_push = 1;
        @(negedge clk);
        fr_push = 0;
      end
      ev.push_back({RO_TRAILER, 8'b0, err, 12'(cnt + 1)});
      foreach (ev[i]) exp_ro.push_back(ev[i]);
      if (mon) foreach (ev[i]) exp_mon.push_back(ev[i]);
      else n_skip++;
      n_ev++;
    end
    wait (fr_empty && dut.state == 0);
    repeat (5) @(posedge clk);
    check(got_ro.size() == exp_ro.size(), $sformatf("readout words %0d expected %0d", got_ro.size(), exp_ro.size()));
    foreach (exp_ro[i]) check(i < got_ro.size() && got_ro[i] == exp_ro[i], $sformatf("readout word %0d", i));
    check(got_mon.size() == exp_mon.size(), $sformatf("monitoring words %0d expected %0d", got_mon.size(), exp_mon.size()));
    foreach (exp_mon[i]) check(i < got_mon.size() && got_mon[i] == exp_mon[i], $sformatf("monitoring word %0d", i));
    check(n_done == n_ev, "one ev_done per event");
    $display("events %0d, skipped for monitoring %0d, stalled clocks %0d, timed events %0d", n_ev, n_skip, n_stall, n_timed);
    if (n_skip == 0 || n_stall == 0 || n_timed == 0) begin
      failures++;
      $display("FAIL: a condition was never reached");
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
