// tb_mult_sum: self-checking test of the multiplicity summing.
//
// Loads a random threshold-mask table, then inclusive masks, applies random
// pT values and suppress flags and checks the six saturating 3-bit counts
// exactly two clocks after in_valid. Directed cases: all 26 candidates above
// every threshold (saturation at 7) and all candidates suppressed (zero).
module tb_mult_sum;
  import mioct_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3 clk = ~clk;

  logic in_valid = 0;
  logic [N_CAND-1:0][PT_W-1:0] pt = '0;
  logic [N_CAND-1:0] suppress = '0;
  mult_t [N_THR-1:0] mult;
  logic out_valid;
  logic cfg_we = 0;
  logic [PT_W-1:0] cfg_addr = '0;
  logic [N_THR-1:0] cfg_wdata = '0;
  logic [5:0] tab [8];
  int checks = 0, failures = 0, nsat = 0;

  mult_sum dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [5:0][2:0] model();
    logic [5:0][2:0] m;
    for (int t = 0; t < 6; t++) begin
      int n;
      n = 0;
      for (int c = 0; c < N_CAND; c++) if (!suppress[c] && tab[pt[c]][t]) n++;
      m[t] = (n > 7) ? 3'd7 : 3'(n);
    end
    return m;
  endfunction

  task automatic load(bit inclusive);
    for (int x = 0; x < 8; x++) begin
      tab[x] = inclusive ? 6'((1 << x) - 1) : 6'($urandom);
      @(negedge clk);
      cfg_we = 1; cfg_addr = 3'(x); cfg_wdata = tab[x];
    end
    @(negedge clk) cfg_we = 0;
  endtask

  task automatic apply_and_check();
    logic [5:0][2:0] e;
    @(negedge clk);
    in_valid = 1;
    e = model();
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid) begin failures++; $display("out_valid after one clock"); end
    @(negedge clk);
    checks++;
    if (!out_valid || mult !== e) begin
      failures++;
      if (failures < 10) $display("mult %h expected %h", mult, e);
    end
    foreach (e[t]) if (e[t] == 7) nsat++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      load(pass == 1);
      for (int n = 0; n < 1000; n++) begin
        for (int c = 0; c < N_CAND; c++) begin
          pt[c] = 3'(($urandom % 3 == 0) ? 0 : $urandom % 8);
          suppress[c] = ($urandom % 4 == 0);
        end
        apply_and_check();
      end
    end
    for (int c = 0; c < N_CAND; c++) begin pt[c] = 3'd6; suppress[c] = 1'b0; end
    apply_and_check();
    checks++;
    if (mult !== {6{3'd7}}) failures++;
    suppress = '1;
    apply_and_check();
    checks++;
    if (mult !== '0) failures++;
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
