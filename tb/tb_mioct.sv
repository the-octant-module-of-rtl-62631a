// tb_mioct: end-to-end test of the octant module at its default sizes.
//
// The testbench plays the sector logic, the central trigger (l1a), the
// backplane readout bus (token), the VME interface (local bus) and, through a
// behavioural model, the snapshot memory. It
//   1. loads all look-up tables through the local bus (random zone and pair
//      tables, lower-pT suppression, inclusive thresholds),
//   2. drives random sector words every crossing and checks that the six
//      multiplicities of crossing j appear exactly during crossing j+3,
//      against the reference model,
//   3. sends Level-1 Accepts with windows of 1, 3 and 5 crossings and checks
//      every word read out over the token-passing bus (header, zero-suppressed
//      candidates, trailer) and the events copied to the monitoring FIFO,
//   4. records 64 crossings into the snapshot memory, reads two records back
//      over the local bus, then replays them and checks the replayed words,
//   5. misaligns one sector and checks that the alignment check flags it.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_mioct;
  import mioct_pkg::*;
  import mioct_ref_pkg::*;

  localparam int L1LAT = 20;

  logic clk = 0, rst_n = 0;
  always #3 clk = ~clk;

  int cyc = 0;
  int bcn = 0;
  logic bc_strobe;
  assign bc_strobe = (cyc % 4 == 3);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && bc_strobe) bcn <= bcn + 1;
  end

  logic bcr = 0, l1a = 0, ecr = 0;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] sl_data = '0, sl_drive_data;
  logic sl_drive_en;
  mult_t [N_THR-1:0] mult;
  logic ro_token_in = 0, ro_token_out, ro_valid, ro_oe, busy;
  logic [RO_W-1:0] ro_data;
  logic [23:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_we = 0, lb_re = 0, lb_rack;
  logic mem_wr, mem_rd, mem_rvalid;
  logic [18:0] mem_waddr, mem_raddr;
  logic [143:0] mem_wdata, mem_rdata;

  mioct dut (.*);

  qdr_sram_model #(.AW(19), .DW(144), .RD_LAT(3)) u_mem (
    .clk, .wr(mem_wr), .waddr(mem_waddr), .wdata(mem_wdata),
    .rd(mem_rd), .raddr(mem_raddr), .rvalid(mem_rvalid), .rdata(mem_rdata));

  mioct_ref ref_m;
  int checks = 0, failures = 0;
  // mechanism counters
  int n_sup = 0, n_sat = 0, n_ev = 0, n_zs = 0, n_token = 0, n_mon = 0;
  int n_win [6];
  int n_rec = 0, n_rb = 0, n_play = 0, n_bcerr = 0;

  // effective input words and expected results per crossing
  logic [N_SECTORS-1:0][SECTOR_W-1:0] eff [int];
  logic [5:0][2:0] exp_m [int];
  logic [25:0]     exp_s [int];
  bit trig_check = 1;
  bit drive_random = 1;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // ---------------- local bus ----------------
  task automatic lb_write(logic [23:0] a, logic [31:0] d);
    @(negedge clk);
    lb_addr = a; lb_wdata = d; lb_we = 1;
    @(negedge clk);
    lb_we = 0;
  endtask

  task automatic lb_read(logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    lb_addr = a; lb_re = 1;
    @(negedge clk);
    lb_re = 0;
    d = lb_rdata;
    if (!lb_rack) fail("no read acknowledge");
  endtask

  // ---------------- sector logic ----------------
  // New words at the start of each crossing; sampled by the module at phase 2.
  always @(negedge clk) begin
    if (rst_n && cyc % 4 == 0 && drive_random) begin
      for (int s = 0; s < N_SECTORS; s++)
        sl_data[s] = rand_sector((bcn % 5 == 0) ? 95 : 35, 12, 3'(bcn % 3564));
    end
  end

  // The crossing's effective input (replay data while replaying) and its
  // expected trigger results.
  always @(negedge clk) begin
    if (rst_n && cyc % 4 == 2) begin
      logic [5:0][2:0] m;
      logic [25:0] s;
      eff[bcn] = sl_drive_en ? sl_drive_data : sl_data;
      ref_m.compute(eff[bcn], m, s);
      exp_m[bcn] = m;
      exp_s[bcn] = s;
    end
  end

  // Multiplicities of crossing j during crossing j+3.
  always @(negedge clk) begin
    if (rst_n && bc_strobe && trig_check && exp_m.exists(bcn - 3) && bcn > 10) begin
      checks++;
      if (mult !== exp_m[bcn - 3]) fail($sformatf("mult %h expected %h (crossing %0d)", mult, exp_m[bcn - 3], bcn - 3));
      if (exp_s[bcn - 3] != 0) n_sup++;
      foreach (mult[t]) if (mult[t] == 3'd7) n_sat++;
    end
  end

  // ---------------- readout ----------------
  logic [35:0] exp_ro [$];
  logic [35:0] got_ro [$];
  logic [35:0] exp_ev [int][$];   // by event number, for the monitoring check

  task automatic expect_event(int t, int pre, int post, int l1id);
    int trig, first, cnt;
    logic [35:0] ev [$];
    trig  = t - 1 - L1LAT;
    first = trig - pre;
    ev.push_back({RO_HEADER, 1'b0, 8'((first + 1) % 3564), 24'(l1id)});
    cnt = 1;
    for (int i = 0; i < pre + post + 1; i++)
      for (int c = 0; c < N_CAND; c++) begin
        sector_word_t w;
        cand_t cd;
        w  = sector_word_t'(eff[first + i][c / 2]);
        cd = (c % 2) ? w.c1 : w.c0;
        if (cd.pt != 0) begin
          ev.push_back({RO_CAND, 3'(i), 4'(c / 2), 1'(c % 2), 5'b0, w.flags, w.bcid, cd});
          cnt++;
        end else n_zs++;
      end
    ev.push_back({RO_TRAILER, 8'b0, 13'b0, 12'(cnt + 1)});
    foreach (ev[i]) exp_ro.push_back(ev[i]);
    exp_ev[l1id] = ev;
    n_win[pre + post + 1]++;
  endtask

  always @(posedge clk) if (rst_n && ro_valid) got_ro.push_back(ro_data);

  // Token circulation: pass the token to the module whenever it is idle.
  bit token_run = 1;
  initial begin
    @(posedge rst_n);
    while (token_run) begin
      @(negedge clk) ro_token_in = 1;
      @(negedge clk) ro_token_in = 0;
      @(posedge ro_token_out);
      n_token++;
      repeat (3) @(negedge clk);
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    int unsigned ca[$], cd[$];
    logic [31:0] d;
    int l1id;
    ref_m = new();
    ref_m.make_luts(30, 40);
    ref_m.build_cfg(ca, cd);
    repeat (4) @(posedge clk);
    rst_n = 1;
    trig_check = 0;
    foreach (ca[i]) lb_write(24'h400000 | 24'(ca[i]), cd[i]);
    for (int s = 0; s < N_SECTORS; s++) lb_write(24'h10 + 24'(s), 32'h2);   // phase 2, no delay
    lb_write(24'h1, L1LAT);
    lb_write(24'h0, {24'b0, 2'd2, 2'd2, 3'd1, 1'b1});                     // window -2..+2, check on
    lb_write(24'h3, 32'h1fff);
    repeat (20) @(negedge clk);
    trig_check = 1;

    // trigger path runs; Level-1 Accepts with windows 5, 1 and 3
    l1id = 0;
    repeat (100) @(negedge clk);
    for (int e = 0; e < 12; e++) begin
      int pre, post, t;
      pre  = (e % 3 == 0) ? 2 : (e % 3 == 1) ? 0 : 1;
      post = pre;
      lb_write(24'h0, {24'b0, 2'(post), 2'(pre), 3'd1, 1'b1});
      repeat (30) @(negedge clk);
      // assert l1a for one whole crossing
      while (cyc % 4 != 0) @(negedge clk);
      t = bcn;
      l1a = 1;
      repeat (4) @(negedge clk);
      l1a = 0;
      expect_event(t, pre, post, l1id);
      l1id++;
      repeat (40 + 37 * e % 50) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    checks++;
    if (got_ro.size() != exp_ro.size()) fail($sformatf("readout words %0d expected %0d", got_ro.size(), exp_ro.size()));
    foreach (exp_ro[i]) begin
      checks++;
      if (i >= got_ro.size() || got_ro[i] !== exp_ro[i]) begin
        fail($sformatf("readout word %0d: %h expected %h", i, (i < got_ro.size()) ? got_ro[i] : 36'h0, exp_ro[i]));
      end
    end
    n_ev = l1id;
    lb_read(24'h4, d);
    checks++;
    if (d[23:0] != 24'(l1id)) fail("event counter");

    // monitoring FIFO: whole events, each equal to its readout copy
    begin
      logic [35:0] mw [$];
      forever begin
        logic [31:0] hi, lo;
        lb_read(24'h30, hi);
        if (hi[31]) break;
        lb_read(24'h31, lo);
        mw.push_back({hi[3:0], lo});
      end
      while (mw.size() > 0) begin
        int id;
        id = int'(mw[0][23:0]);
        checks++;
        if (!exp_ev.exists(id)) begin fail("monitoring event unknown"); break; end
        foreach (exp_ev[id][k]) begin
          if (mw.size() == 0 || mw[0] !== exp_ev[id][k]) begin
            fail($sformatf("monitoring word %h expected %h (event %0d word %0d)",
                           (mw.size() > 0) ? mw[0] : 36'h0, exp_ev[id][k], id, k));
            mw.delete();
            break;
          end
          void'(mw.pop_front());
        end
        n_mon++;
      end
    end

    // snapshot: record 64 crossings
    lb_write(24'h21, 64);
    lb_write(24'h20, 32'h5);                // mode record, start
    do begin
      lb_read(24'h23, d);
    end while (!d[1]);
    n_rec++;
    // read back records 0 and 63 and match them to the driven crossings
    begin
      int j0;
      j0 = -1;
      for (int r = 0; r < 2; r++) begin
        logic [143:0] w [3];
        logic [575:0] rec;
        int bcrec;
        bcrec = (r == 0) ? 0 : 63;
        for (int b = 0; b < 4; b++) begin
          lb_write(24'h22, 32'(bcrec * 4 + b));
          do lb_read(24'h23, d); while (!d[2]);
          for (int k = 0; k < 5; k++) begin
            lb_read(24'h28 + 24'(k), d);
            rec[b*144 + k*32 +: 32] = (k == 4) ? {16'b0, d[15:0]} : d;
          end
        end
        if (r == 0) begin
          foreach (eff[j]) if (eff[j] == rec[415:0]) j0 = j;
          checks++;
          if (j0 < 0) fail("snapshot record 0 matches no crossing");
        end else if (j0 >= 0) begin
          checks++;
          if (rec[415:0] !== eff[j0 + 63]) fail("snapshot record 63");
        end
        if (j0 >= 0) begin
          checks++;
          if (rec[459:416] !== {exp_s[j0 + bcrec], exp_m[j0 + bcrec]}) fail("snapshot trigger results");
          else n_rb++;
        end
      end
      // replay with drive: the 64 crossings come back in order
      begin
        int k;
        k = 0;
        lb_write(24'h20, 32'h26);           // mode replay, start, drive
        while (k < 64) begin
          @(negedge clk);
          if (cyc % 4 == 2 && sl_drive_en) begin
            checks++;
            if (j0 < 0 || sl_drive_data !== eff[j0 + k]) fail($sformatf("replayed crossing %0d", k));
            else n_play++;
            k++;
          end
          if (cyc > 5000000) break;
        end
        repeat (40) @(negedge clk);
        checks++;
        if (sl_drive_en) fail("replay did not stop");
      end
    end

    // misalign sector 3 by one crossing: only it must be flagged
    lb_write(24'h3, 32'h1fff);
    trig_check = 0;
    lb_write(24'h13, 32'h102);
    repeat (40) @(negedge clk);
    lb_read(24'h3, d);
    checks++;
    if (d[12:0] != 13'h0008) fail($sformatf("alignment flags %h", d[12:0]));
    else n_bcerr++;

    token_run = 0;
    // every mechanism must have happened
    checks++;
    if (n_sup == 0 || n_sat == 0 || n_ev == 0 || n_zs == 0 || n_token == 0 || n_mon == 0 ||
        n_win[1] == 0 || n_win[3] == 0 || n_win[5] == 0 || n_rec == 0 || n_rb < 2 || n_play != 64 || n_bcerr == 0)
      fail("a mechanism never happened");
    $display("suppressions %0d saturations %0d events %0d (windows 1/3/5: %0d/%0d/%0d) zero-suppressed %0d tokens %0d monitored %0d",
             n_sup, n_sat, n_ev, n_win[1], n_win[3], n_win[5], n_zs, n_token, n_mon);
    $display("snapshot records %0d readbacks %0d replayed %0d alignment errors %0d", n_rec, n_rb, n_play, n_bcerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
