// overlap_handling: overlap resolution and multiplicity for one half-octant.
//
// Structure (after the overlap-handling block diagram): the 26 candidates of
// the 13 aligned sector words feed four overlap detection units, one per
// overlap region (barrel-barrel, barrel-end-cap, end-cap-end-cap,
// forward-forward), which produce 8, 32, 20 and 8 overlap flags. The
// suppress-flag generator combines these 68 flags with the candidates' pT
// values into 26 suppress flags, and the multiplicity summing counts the
// non-suppressed candidates into six 3-bit words.
//
// Sector pairs per region (sector order BA31 BA32 BA01 BA02 EC47 EC00 EC01
// EC02 EC03 EC04 FW00 FW01 FW02 = 0..12) are listed in mioct_pkg.
//
// Configuration address (22 bits): cfg_addr[21:19] selects the table block
//   0..3 = BA-BA, BA-EC, EC-EC, FW-FW detection unit (cfg_addr[18:0])
//   4    = suppress tables (cfg_addr[7:0]),  5 = threshold table (cfg_addr[2:0]).
//
// Timing: five clocks from in_valid to out_valid (detection 2, suppress 1,
// summing 2). The pT values are delayed to meet the flags.
//
// The document gives this structure, the flag counts and that every block is
// a programmable table; the table organisation is this design's.
module overlap_handling
  import mioct_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [N_SECTORS-1:0][SECTOR_W-1:0] sectors,
  output mult_t [N_THR-1:0]                  mult,
  output logic [N_CAND-1:0]                  suppress,
  output logic                               out_valid,
  input  logic                               cfg_we,
  input  logic [21:0]                        cfg_addr,
  input  logic [N_THR-1:0]                   cfg_wdata
);

  cand_t cand [N_CAND];
  logic [N_CAND-1:0][PT_W-1:0] pt0, pt1, pt2, pt3;
  logic [N_FLAGS-1:0] flags;
  logic [N_REG-1:0] det_valid;
  logic sup_valid;
  logic [N_CAND-1:0] sup;

  always_comb begin
    for (int s = 0; s < N_SECTORS; s++) begin
      sector_word_t w;
      w = sector_word_t'(sectors[s]);
      cand[2*s]     = w.c0;
      cand[2*s + 1] = w.c1;
    end
    for (int c = 0; c < N_CAND; c++) pt0[c] = cand[c].pt;
  end

  for (genvar r = 0; r < N_REG; r++) begin : g_det
    localparam int NP = region_pairs(r);
    cand_t ca [NP][2];
    cand_t cb [NP][2];
    for (genvar p = 0; p < NP; p++) begin : g_pair
      for (genvar k = 0; k < 2; k++) begin : g_k
        assign ca[p][k] = cand[2*pair_sector(r, p, 0) + k];
        assign cb[p][k] = cand[2*pair_sector(r, p, 1) + k];
      end
    end
    ovl_detect #(.N_PAIRS(NP), .USE_PT_SIGN(r == REG_BAEC)) u_det (
      .clk, .rst_n, .in_valid,
      .cand_a(ca), .cand_b(cb),
      .flags(flags[region_flag_ofs(r) +: 4*NP]),
      .out_valid(det_valid[r]),
      .cfg_we(cfg_we && cfg_addr[21:19] == 3'(r)),
      .cfg_addr(cfg_addr[18:0]),
      .cfg_wdata(cfg_wdata[ZONE_W-1:0])
    );
  end

  always_ff @(posedge clk) begin
    pt1 <= pt0;
    pt2 <= pt1;
    pt3 <= pt2;
  end

  suppress_gen u_sup (
    .clk, .rst_n,
    .in_valid(det_valid[0]),
    .ovl_flags(flags),
    .pt(pt2),
    .suppress(sup),
    .out_valid(sup_valid),
    .cfg_we(cfg_we && cfg_addr[21:19] == 3'd4),
    .cfg_addr(cfg_addr[7:0]),
    .cfg_wdata(cfg_wdata[1:0])
  );

  mult_sum u_sum (
    .clk, .rst_n,
    .in_valid(sup_valid),
    .pt(pt3),
    .suppress(sup),
    .mult,
    .out_valid,
    .cfg_we(cfg_we && cfg_addr[21:19] == 3'd5),
    .cfg_addr(cfg_addr[PT_W-1:0]),
    .cfg_wdata(cfg_wdata)
  );

  // Suppress flags of the same bunch crossing as mult.
  always_ff @(posedge clk) begin
    if (sup_valid) suppress <= sup;
  end

endmodule
