// tb_sync_align: self-checking test of resynchronisation and alignment.
//
// Each of the 13 sectors sends words tagged with the crossing number n and
// the sector number, with its own clock skew (0..3 clocks) and its own extra
// latency (0..5 crossings). The testbench sets each sampling phase two clocks
// after the skew and each alignment delay from the sector's total offset
// (latency plus the crossing its sampling phase falls in).
// After every crossing all 13 aligned words must then carry the same crossing
// number, one more than the crossing before, at a fixed distance from the
// local crossing count, and the BCID check must pass. Then one sector's delay
// is put off by one: exactly that sector must be flagged.
module tb_sync_align;
  import mioct_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3 clk = ~clk;

  logic bc_strobe;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] sl_in;
  logic [N_SECTORS-1:0][1:0] phase_sel;
  logic [N_SECTORS-1:0][4:0] delay;
  logic [BCID_W-1:0] bcid_local, bcid_offset = '0;
  logic check_en = 0;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] aligned;
  logic aligned_valid;
  logic [N_SECTORS-1:0] bcid_err;
  logic bcid_err_valid;

  sync_align dut (.*);

  int cyc = 0;
  int skew [N_SECTORS], lat [N_SECTORS];
  int checks = 0, failures = 0, nflag = 0;
  int prev_n = -1, lat_dist = -1000;
  bit misalign = 0;
  int cyc_mis = 0;
  always @(posedge misalign) cyc_mis = cyc;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign bc_strobe  = (cyc % 4 == 3);
  assign bcid_local = 3'(cyc / 4);

  always_comb begin
    for (int s = 0; s < N_SECTORS; s++) begin
      int n;
      n = (cyc - skew[s]) / 4 - lat[s] + 100;
      sl_in[s] = {5'b0, 3'(n), 20'(n), 4'(s)};
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int lmax;
    lmax = 0;
    for (int s = 0; s < N_SECTORS; s++) begin
      skew[s] = $urandom % 4;
      lat[s]  = $urandom % 6;
      if (lat[s] > lmax) lmax = lat[s];
    end
    // A word sampled at phase p (p = 0 at the strobe clock) is taken k clocks
    // before the strobe that moves it on: k = 4 for p = 0, else 4 - p. The
    // resulting crossing offset per sector is equalised with the delays.
    begin
      int o [N_SECTORS];
      int omin;
      omin = 1 << 30;
      for (int s = 0; s < N_SECTORS; s++) begin
        int k;
        phase_sel[s] = 2'((skew[s] + 2) % 4);
        k = (phase_sel[s] == 0) ? 4 : 4 - int'(phase_sel[s]);
        o[s] = (1003 - k - skew[s]) / 4 - lat[s];
        if (o[s] < omin) omin = o[s];
      end
      for (int s = 0; s < N_SECTORS; s++) delay[s] = 5'(o[s] - omin);
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);
    // BCID offset from the observed distance, then enable the check
    bcid_offset = 3'(lat_dist);
    check_en = 1;
    repeat (400) @(posedge clk);
    @(negedge clk);
    misalign = 1;
    delay[5] = delay[5] + 1;
    repeat (100) @(posedge clk);
    checks++;
    if (nflag == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // aligned words
  always @(negedge clk) begin
    if (rst_n && aligned_valid && cyc > 80 && !misalign) begin
      int n0;
      n0 = int'(aligned[0][23:4]);
      checks++;
      for (int s = 0; s < N_SECTORS; s++)
        if (aligned[s][23:4] != 20'(n0) || aligned[s][3:0] != 4'(s)) begin
          failures++;
          if (failures < 10) $display("sector %0d word %h, sector 0 %h", s, aligned[s], aligned[0]);
        end
      if (prev_n >= 0 && n0 != prev_n + 1) begin failures++; $display("crossing jump %0d -> %0d", prev_n, n0); end
      prev_n = n0;
      if (lat_dist == -1000) lat_dist = (cyc / 4) - n0;
      else if (lat_dist != (cyc / 4) - n0) begin failures++; $display("latency changed"); end
    end
  end

  // alignment check flags
  always @(negedge clk) begin
    if (rst_n && bcid_err_valid && check_en && cyc > 260) begin
      checks++;
      if (!misalign && bcid_err != 0) begin failures++; $display("unexpected bcid_err %b", bcid_err); end
      if (misalign && cyc > cyc_mis + 20) begin
        if (bcid_err != 13'(1 << 5)) begin failures++; $display("bcid_err %b", bcid_err); end
        else nflag++;
      end
    end
  end
endmodule
