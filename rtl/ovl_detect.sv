// ovl_detect: look-up-table overlap detection unit for one overlap region.
//
// The unit serves N_PAIRS pairs of adjacent sectors (A side, B side). Every
// sector carries two candidates, so each pair yields four overlap flags, one
// per candidate combination; flag index = 4*pair + 2*a + b. Detection is done
// by two ranks of programmable tables:
//   1. zone tables, one per pair and side, map a candidate's 8-bit region-of-
//      interest (sub-sector) address to a ZONE_W-bit overlap zone code
//      (0 = not in the overlap with this neighbour);
//   2. a pair table per sector pair, addressed by the two zone codes and, when
//      USE_PT_SIGN is set (the barrel/end-cap region), also by the two pT
//      thresholds and charge signs, gives the overlap flag.
// A flag is only raised when both candidates are present (pT /= 0).
//
// Configuration (single write port, cfg_addr[18] selects the table):
//   zone table: cfg_addr = {1'b0, 5'b0, pair[3:0], side, roi[7:0]}, data = zone
//   pair table: cfg_addr = {1'b1, pair[3:0], index[13:0]},       data bit 0
//   pair index = {zone_a, zone_b} or {zone_a, zone_b, pt_a, pt_b, sign_a, sign_b}.
// Tables are memories without reset and must be loaded before use.
//
// Timing: two clock cycles from in_valid to out_valid (registered zone and
// pair table reads).
//
// The document gives one such unit per region, its flag counts and that it is
// LUT-based, using sub-sector addresses and, for barrel/end-cap, pT and charge
// sign. The two-rank table structure and its address map are this design's.
module ovl_detect
  import mioct_pkg::*;
#(
  parameter int N_PAIRS     = 2,
  parameter bit USE_PT_SIGN = 1'b0,
  localparam int PAIR_AW    = USE_PT_SIGN ? (2 * ZONE_W + 2 * PT_W + 2) : (2 * ZONE_W)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cand_t                cand_a [N_PAIRS][2],
  input  cand_t                cand_b [N_PAIRS][2],
  output logic [4*N_PAIRS-1:0] flags,
  output logic                 out_valid,
  input  logic                 cfg_we,
  input  logic [18:0]          cfg_addr,
  input  logic [ZONE_W-1:0]    cfg_wdata
);

  logic [ZONE_W-1:0] zlut [2*N_PAIRS][2**ROI_W];
  logic              plut [N_PAIRS][2**PAIR_AW];

  // Stage 1 registers
  logic [ZONE_W-1:0] za [N_PAIRS][2];
  logic [ZONE_W-1:0] zb [N_PAIRS][2];
  cand_t             ca1 [N_PAIRS][2];
  cand_t             cb1 [N_PAIRS][2];
  logic              v1;

  // Configuration writes
  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (!cfg_addr[18]) begin
        if (int'(cfg_addr[12:9]) < N_PAIRS)
          zlut[2*int'(cfg_addr[12:9]) + int'(cfg_addr[8])][cfg_addr[7:0]] <= cfg_wdata;
      end else begin
        if (int'(cfg_addr[17:14]) < N_PAIRS)
          plut[int'(cfg_addr[17:14])][cfg_addr[PAIR_AW-1:0]] <= cfg_wdata[0];
      end
    end
  end

  // Stage 1: zone look-up
  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PAIRS; p++) begin
      for (int k = 0; k < 2; k++) begin
        za[p][k]  <= zlut[2*p][cand_a[p][k].roi];
        zb[p][k]  <= zlut[2*p+1][cand_b[p][k].roi];
        ca1[p][k] <= cand_a[p][k];
        cb1[p][k] <= cand_b[p][k];
      end
    end
  end

  // Stage 2: pair look-up
  function automatic logic [PAIR_AW-1:0] pair_index(input logic [ZONE_W-1:0] zoa,
                                                     input logic [ZONE_W-1:0] zob,
                                                     input cand_t a, input cand_t b);
    logic [2*ZONE_W+2*PT_W+1:0] full;
    full = {zoa, zob, a.pt, b.pt, a.sign, b.sign};
    if (USE_PT_SIGN) return PAIR_AW'(full);
    else             return PAIR_AW'({zoa, zob});
  endfunction

  always_ff @(posedge clk) begin
    for (int p = 0; p < N_PAIRS; p++) begin
      for (int a = 0; a < 2; a++) begin
        for (int b = 0; b < 2; b++) begin
          flags[4*p + 2*a + b] <= (ca1[p][a].pt != '0) && (cb1[p][b].pt != '0) &&
                                  plut[p][pair_index(za[p][a], zb[p][b], ca1[p][a], cb1[p][b])];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
