// tb_suppress_gen: self-checking test of the suppress-flag generation.
//
// Loads random 2-bit decision tables for the four regions, applies random
// overlap flags and pT values every clock and compares the suppress flags one
// clock later with a model that walks the sector-pair lists of the reference
// package (kept separately from the design's own lists).
module tb_suppress_gen;
  import mioct_pkg::*;
  import mioct_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3 clk = ~clk;

  logic in_valid = 0;
  logic [N_FLAGS-1:0] ovl_flags = '0;
  logic [N_CAND-1:0][PT_W-1:0] pt = '0;
  logic [N_CAND-1:0] suppress;
  logic out_valid;
  logic cfg_we = 0;
  logic [7:0] cfg_addr = '0;
  logic [1:0] cfg_wdata = '0;
  logic [1:0] tab [4][64];
  int checks = 0, failures = 0, nsup = 0;

  suppress_gen dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_CAND-1:0] model(logic [N_FLAGS-1:0] f, logic [N_CAND-1:0][2:0] p);
    logic [N_CAND-1:0] s;
    int fi;
    s = '0;
    fi = 0;
    for (int r = 0; r < 4; r++)
      for (int q = 0; q < npairs[r]; q++)
        for (int a = 0; a < 2; a++)
          for (int b = 0; b < 2; b++) begin
            int ca, cb;
            ca = 2 * pa[r][q] + a;
            cb = 2 * pb[r][q] + b;
            if (f[fi]) begin
              if (tab[r][{p[ca], p[cb]}][1]) s[ca] = 1;
              if (tab[r][{p[ca], p[cb]}][0]) s[cb] = 1;
            end
            fi++;
          end
    return s;
  endfunction

  initial begin
    logic [N_CAND-1:0] exp_q [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++)
      for (int x = 0; x < 64; x++) begin
        tab[r][x] = 2'($urandom);
        @(negedge clk);
        cfg_we = 1; cfg_addr = {2'(r), 6'(x)}; cfg_wdata = tab[r][x];
      end
    @(negedge clk) cfg_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (!out_valid || suppress !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("suppress %h expected %h", suppress, exp_q[0]);
        end
        if (suppress != 0) nsup++;
        void'(exp_q.pop_front());
      end
      for (int f = 0; f < N_FLAGS; f++) ovl_flags[f] = ($urandom % 8 == 0);
      for (int c = 0; c < N_CAND; c++) pt[c] = 3'($urandom % 7);
      in_valid = 1;
      exp_q.push_back(model(ovl_flags, pt));
    end
    checks++;
    if (nsup == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
