// mult_sum: multiplicity summing of the 26 candidates of a half-octant.
//
// Each candidate's 3-bit pT value addresses a programmable 8 x 6-bit table
// that gives the set of thresholds the candidate counts for (typically
// inclusive: pT value n counts for thresholds 1..n). Candidates flagged for
// suppression by the overlap handling are ignored. The per-threshold counts
// are summed in two halves of 13 candidates (first clock) and then added and
// saturated to 3 bits (second clock), giving six 3-bit multiplicities.
//
// Configuration: cfg_addr = pT value (3 bits), cfg_wdata = threshold mask,
// bit t set = count for threshold t+1. No reset on the table.
// Timing: mult/out_valid two clocks after in_valid.
//
// The document gives the function (count candidates per threshold, ignore
// suppressed ones, six 3-bit words, LUT-based). The threshold-mask table,
// the saturation at 7 and the two-stage adder are this design's choices.
module mult_sum
  import mioct_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [N_CAND-1:0][PT_W-1:0]  pt,
  input  logic [N_CAND-1:0]            suppress,
  output mult_t [N_THR-1:0]            mult,
  output logic                         out_valid,
  input  logic                         cfg_we,
  input  logic [PT_W-1:0]              cfg_addr,
  input  logic [N_THR-1:0]             cfg_wdata
);

  localparam int HALF = N_CAND / 2;
  localparam int CW   = $clog2(N_CAND + 1);

  logic [N_THR-1:0] tlut [2**PT_W];
  logic [CW-1:0] part_c [2][N_THR];
  logic [CW-1:0] part   [2][N_THR];
  logic          v1;

  always_ff @(posedge clk) begin
    if (cfg_we) tlut[cfg_addr] <= cfg_wdata;
  end

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      for (int t = 0; t < N_THR; t++) begin
        part_c[h][t] = '0;
        for (int i = 0; i < HALF; i++) begin
          logic [N_THR-1:0] m;
          m = tlut[pt[h*HALF + i]];
          if (!suppress[h*HALF + i] && m[t]) part_c[h][t] = part_c[h][t] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      mult      <= '0;
      for (int h = 0; h < 2; h++)
        for (int t = 0; t < N_THR; t++) part[h][t] <= '0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (in_valid) part <= part_c;
      if (v1) begin
        for (int t = 0; t < N_THR; t++) begin
          logic [CW:0] sum;
          sum = part[0][t] + part[1][t];
          mult[t] <= (sum > (2**MULT_W - 1)) ? mult_t'(2**MULT_W - 1) : mult_t'(sum);
        end
      end
    end
  end

endmodule
