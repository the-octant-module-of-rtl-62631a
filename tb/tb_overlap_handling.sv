// tb_overlap_handling: self-checking test of the complete overlap handling.
//
// Loads random zone and pair tables, suppress-the-lower-pT tables and
// inclusive threshold masks, drives one random set of 13 sector words every
// four clocks (one bunch crossing) and compares suppress flags and
// multiplicities with the reference model, checking the five-clock latency.
// Also counts how often suppression and multiplicity saturation occurred.
module tb_overlap_handling;
  import mioct_pkg::*;
  import mioct_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3 clk = ~clk;

  logic in_valid = 0;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] sectors = '0;
  mult_t [N_THR-1:0] mult;
  logic [N_CAND-1:0] suppress;
  logic out_valid;
  logic cfg_we = 0;
  logic [21:0] cfg_addr = '0;
  logic [N_THR-1:0] cfg_wdata = '0;

  int checks = 0, failures = 0;
  int n_sup = 0, n_sat = 0;

  overlap_handling dut (.*);

  mioct_ref ref_m;
  int unsigned ca[$], cd[$];
  logic [5:0][2:0] exp_mult [$];
  logic [25:0]     exp_sup  [$];
  int              exp_time [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_mult.size() == 0) begin
        failures++;
        $display("unexpected out_valid");
      end else begin
        logic [5:0][2:0] em;
        logic [25:0] es;
        int et;
        em = exp_mult.pop_front();
        es = exp_sup.pop_front();
        et = exp_time.pop_front();
        if (mult !== em || suppress !== es || cyc != et + 5) begin
          failures++;
          $display("mismatch: mult %h exp %h sup %h exp %h t %0d exp %0d", mult, em, suppress, es, cyc, et + 5);
        end
      end
    end
  end

  initial begin
    ref_m = new();
    ref_m.make_luts(30, 40);
    ref_m.build_cfg(ca, cd);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ca[i]) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 22'(ca[i]); cfg_wdata = 6'(cd[i]);
    end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [5:0][2:0] m;
      logic [25:0] s;
      @(negedge clk);
      for (int i = 0; i < N_SECTORS; i++) sectors[i] = rand_sector((n % 3 == 0) ? 90 : 40, 16, 3'(n));
      ref_m.compute(sectors, m, s);
      exp_mult.push_back(m);
      exp_sup.push_back(s);
      exp_time.push_back(cyc);
      if (s != 0) n_sup++;
      foreach (m[t]) if (m[t] == 7) n_sat++;
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_mult.size() != 0) begin failures++; $display("missing outputs"); end
    checks++;
    if (n_sup == 0 || n_sat == 0) begin failures++; $display("suppression %0d saturation %0d", n_sup, n_sat); end
    $display("crossings with suppression: %0d, saturated multiplicities: %0d", n_sup, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
