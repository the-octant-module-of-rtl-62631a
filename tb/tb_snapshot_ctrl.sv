// tb_snapshot_ctrl: self-checking test of the snapshot / test-data memory
// control, with a behavioural memory (read latency 3) and a 256-crossing
// depth. A crossing of random sector words is presented every four clocks,
// its trigger results five clocks later, as the overlap handling delivers
// them. Checks:
//  * record writes four memory words per crossing for exactly `length`
//    crossings, each holding the sector words and the results of one and the
//    same crossing, consecutive crossings at consecutive addresses, and
//    ends with done;
//  * readback returns the memory word asked for;
//  * replay presents the recorded sector words, one crossing per bunch
//    crossing and in order, with play_drive following the drive bit, ends
//    with done, and with loop set wraps around until stop.
module tb_snapshot_ctrl;
  import mioct_pkg::*;

  localparam int BC_AW = 8;
  localparam int MEM_AW = BC_AW + 2;

  logic clk = 0, rst_n = 0, bc_strobe = 0;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] sectors = '0, play_data;
  logic res_valid = 0;
  mult_t [N_THR-1:0] mult = '0;
  logic [N_CAND-1:0] suppress = '0;
  logic [1:0] mode = 0;
  logic start = 0, stop = 0, loop = 0, drive = 0;
  logic [BC_AW:0] length = '0;
  logic running, done, play_active, play_drive;
  logic [BC_AW-1:0] bc_addr;
  logic [MEM_AW-1:0] rb_addr = '0;
  logic rb_req = 0, rb_done;
  logic [143:0] rb_data;
  logic mem_wr, mem_rd, mem_rvalid;
  logic [MEM_AW-1:0] mem_waddr, mem_raddr;
  logic [143:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  logic [N_SECTORS-1:0][SECTOR_W-1:0] h_sec [int];
  logic [43:0] h_res [int];
  logic [143:0] shadow [int];
  int bcn = 0, n_wr = 0;
  int play_idx = 0, n_play = 0, L_play = 20;
  logic act_q = 0;

  snapshot_ctrl #(.BC_AW(BC_AW), .RES_LAG(5)) dut (.*);

  qdr_sram_model #(.AW(MEM_AW), .DW(144), .RD_LAT(3)) u_mem (
    .clk, .wr(mem_wr), .waddr(mem_waddr), .wdata(mem_wdata),
    .rd(mem_rd), .raddr(mem_raddr), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // crossing source: new sector words at each strobe edge, results 5 clocks later
  int cyc = 0;
  int due_cyc [$], due_bc [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bc_strobe <= ((cyc + 1) % 4 == 0);
    if (bc_strobe && rst_n) begin
      logic [N_SECTORS-1:0][SECTOR_W-1:0] s;
      for (int i = 0; i < N_SECTORS; i++) s[i] = $urandom;
      sectors <= s;
      h_sec[bcn] = s;
      h_res[bcn] = {26'($urandom), 18'($urandom)};
      due_cyc.push_back(cyc + 5);
      due_bc.push_back(bcn);
      bcn++;
    end
    res_valid <= 0;
    if (due_cyc.size() != 0 && due_cyc[0] == cyc) begin
      res_valid <= 1;
      {suppress, mult} <= h_res[due_bc[0]];
      void'(due_cyc.pop_front());
      void'(due_bc.pop_front());
    end
    if (mem_wr) begin
      shadow[int'(mem_waddr)] = mem_wdata;
      n_wr++;
    end
  end

  task automatic pulse_start(logic [1:0] m);
    @(negedge clk);
    mode = m;
    start = 1;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    int L, j0;
    logic [459:0] rec;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    // ---- record ----
    L = 20;
    length = 9'(L);
    pulse_start(2'd1);
    check(running, "running after start");
    wait (done);
    repeat (20) @(posedge clk);
    check(!running, "record stops by itself");
    check(n_wr == 4 * L, $sformatf("memory writes %0d expected %0d", n_wr, 4 * L));
    j0 = -1;
    rec = {shadow[3][171-144:0], shadow[2], shadow[1], shadow[0]};
    foreach (h_sec[j]) if (h_sec[j] == rec[415:0]) j0 = j;
    check(j0 >= 0, "first record holds a presented crossing");
    for (int b = 0; b < L; b++) begin
      rec = {shadow[4*b+3][171-144:0], shadow[4*b+2], shadow[4*b+1], shadow[4*b]};
      check(rec[415:0] == h_sec[j0 + b], $sformatf("record %0d sector words", b));
      check(rec[459:416] == h_res[j0 + b], $sformatf("record %0d trigger results", b));
    end
    // ---- readback ----
    for (int i = 0; i < 10; i++) begin
      int a;
      a = $urandom % (4 * L);
      @(negedge clk);
      rb_addr = MEM_AW'(a);
      rb_req = 1;
      @(negedge clk);
      rb_req = 0;
      wait (rb_done);
      @(negedge clk);
      check(rb_data == shadow[a], $sformatf("readback of word %0d", a));
    end
    // ---- replay once, driving the outputs ----
    drive = 1;
    loop = 0;
    n_play = 0;
    pulse_start(2'd2);
    wait (done);
    repeat (8) @(posedge clk);
    check(n_play == L, $sformatf("replayed crossings %0d expected %0d", n_play, L));
    check(!running && !play_active, "replay stops by itself");
    // ---- replay in a loop, not driving, until stop ----
    drive = 0;
    loop = 1;
    n_play = 0;
    pulse_start(2'd2);
    wait (n_play == 2 * L + 7);
    @(negedge clk);
    stop = 1;
    @(negedge clk);
    stop = 0;
    repeat (40) @(posedge clk);
    check(!running && !play_active, "looped replay stops on stop");
    check(n_play >= 2 * L + 7, "looped replay wrapped around");
    $display("records %0d, replayed crossings in the loop %0d", L, n_play);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // replay monitor: each crossing with play_active must carry the next record
  always @(posedge clk) if (rst_n) begin
    act_q <= play_active;
    if (play_active && !act_q) play_idx = 0;
    if (bc_strobe && play_active) begin
      logic [459:0] rec;
      int b;
      b = play_idx % L_play;
      rec = {shadow[4*b+3][171-144:0], shadow[4*b+2], shadow[4*b+1], shadow[4*b]};
      check(play_data == rec[415:0], $sformatf("replayed crossing %0d", play_idx));
      check(play_drive == drive, "play_drive follows drive");
      play_idx++;
      n_play++;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
