// tb_ovl_detect: self-checking test of the overlap detection unit.
//
// Two units are tested side by side: a same-type region unit (zone codes
// only) and a barrel/end-cap unit (zone codes, pT and charge sign). Random
// zone and pair tables are loaded through the configuration port, random
// candidate pairs are applied every clock, and the flags are compared two
// clocks later with a table model kept in the testbench.
module tb_ovl_detect;
  import mioct_pkg::*;

  localparam int NP = 2;
  logic clk = 0, rst_n = 0;
  always #3 clk = ~clk;

  logic in_valid = 0;
  cand_t ca [NP][2], cb [NP][2];
  logic [4*NP-1:0] flags0, flags1;
  logic v0, v1;
  logic we0 = 0, we1 = 0;
  logic [18:0] cfg_addr = '0;
  logic [ZONE_W-1:0] cfg_wdata = '0;

  ovl_detect #(.N_PAIRS(NP), .USE_PT_SIGN(1'b0)) dut0 (
    .clk, .rst_n, .in_valid, .cand_a(ca), .cand_b(cb), .flags(flags0), .out_valid(v0),
    .cfg_we(we0), .cfg_addr, .cfg_wdata);
  ovl_detect #(.N_PAIRS(NP), .USE_PT_SIGN(1'b1)) dut1 (
    .clk, .rst_n, .in_valid, .cand_a(ca), .cand_b(cb), .flags(flags1), .out_valid(v1),
    .cfg_we(we1), .cfg_addr, .cfg_wdata);

  logic [2:0] zl [2][2*NP][256];   // [unit][2*pair+side][roi]
  bit         pl [2][NP][16384];
  int checks = 0, failures = 0, nflags = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4*NP-1:0] model(int u, cand_t a [NP][2], cand_t b [NP][2]);
    logic [4*NP-1:0] f;
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          logic [2:0] za, zb;
          int idx;
          za = zl[u][2*p][a[p][i].roi];
          zb = zl[u][2*p+1][b[p][j].roi];
          idx = (u == 1) ? {za, zb, a[p][i].pt, b[p][j].pt, a[p][i].sign, b[p][j].sign} : {za, zb};
          f[4*p + 2*i + j] = (a[p][i].pt != 0) && (b[p][j].pt != 0) && pl[u][p][idx];
        end
    return f;
  endfunction

  task automatic wr(int u, logic [18:0] a, logic [2:0] d);
    @(negedge clk);
    we0 = (u == 0); we1 = (u == 1); cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    we0 = 0; we1 = 0;
  endtask

  initial begin
    logic [4*NP-1:0] e0 [$], e1 [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int u = 0; u < 2; u++)
      for (int p = 0; p < NP; p++) begin
        for (int s = 0; s < 2; s++)
          for (int r = 0; r < 256; r++) begin
            zl[u][2*p+s][r] = ($urandom % 3 == 0) ? 3'(1 + $urandom % 7) : 3'd0;
            wr(u, {1'b0, 5'b0, 4'(p), 1'(s), 8'(r)}, zl[u][2*p+s][r]);
          end
        for (int x = 0; x < ((u == 1) ? 16384 : 64); x++) begin
          pl[u][p][x] = ($urandom % 2);
          wr(u, {1'b1, 4'(p), 14'(x)}, {2'b0, pl[u][p][x]});
        end
      end
    // Random candidates, one set per clock; restrict roi to a few values so
    // that zones repeat.
    fork
      begin
        for (int n = 0; n < 4000; n++) begin
          @(negedge clk);
          for (int p = 0; p < NP; p++)
            for (int k = 0; k < 2; k++) begin
              ca[p][k] = {1'($urandom), 3'(($urandom % 4 == 0) ? 0 : 1 + $urandom % 6), 8'($urandom % 24)};
              cb[p][k] = {1'($urandom), 3'(($urandom % 4 == 0) ? 0 : 1 + $urandom % 6), 8'($urandom % 24)};
            end
          in_valid = 1;
          e0.push_back(model(0, ca, cb));
          e1.push_back(model(1, ca, cb));
        end
        @(negedge clk) in_valid = 0;
      end
      begin
        @(posedge v0);
        while (e0.size() > 0) begin
          @(negedge clk);
          if (!v0) break;
          checks++;
          begin
            logic [4*NP-1:0] x0, x1;
            x0 = e0.pop_front();
            x1 = e1.pop_front();
            if (flags0 !== x0 || flags1 !== x1 || !v1) begin
              failures++;
              if (failures < 10) $display("flags %b/%b expected %b/%b", flags0, flags1, x0, x1);
            end
            if (flags0 != 0 || flags1 != 0) nflags++;
          end
        end
      end
    join
    checks++;
    if (e0.size() != 0 || nflags == 0) begin failures++; $display("left %0d, flagged %0d", e0.size(), nflags); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
