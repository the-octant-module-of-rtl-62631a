// suppress_gen: suppress-candidate flag generation.
//
// Takes the 68 overlap flags of the four detection units (8 BA-BA, 32 BA-EC,
// 20 EC-EC, 8 FW-FW, concatenated in that order into ovl_flags) and the pT
// thresholds of the 26 candidates. For every raised overlap flag the two
// candidates' pT values address a programmable table of the flag's region,
// which answers which of the two is to be suppressed: bit 1 suppresses the
// A-side candidate, bit 0 the B-side one (both or none are allowed too). A
// candidate is suppressed if any of its overlaps says so.
//
// Flag f = 4*pair + 2*a + b of a region concerns candidate 2*sectorA + a and
// candidate 2*sectorB + b, with the sector pairs listed in mioct_pkg.
//
// Configuration: cfg_addr = {region[1:0], pt_a[2:0], pt_b[2:0]}, data 2 bits.
// The tables have no reset and must be loaded before use.
// Timing: suppress is registered, one clock after in_valid.
//
// The document gives the function (overlap flags plus a pT comparison decide
// which candidate is suppressed) and says it is LUT-based; the table layout
// is this design's.
module suppress_gen
  import mioct_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [N_FLAGS-1:0]           ovl_flags,
  input  logic [N_CAND-1:0][PT_W-1:0]  pt,
  output logic [N_CAND-1:0]            suppress,
  output logic                         out_valid,
  input  logic                         cfg_we,
  input  logic [7:0]                   cfg_addr,
  input  logic [1:0]                   cfg_wdata
);

  localparam int NP_MAX = 8;

  logic [1:0] slut [N_REG][64];
  logic [N_CAND-1:0] sup_c;

  always_ff @(posedge clk) begin
    if (cfg_we) slut[cfg_addr[7:6]][cfg_addr[5:0]] <= cfg_wdata;
  end

  always_comb begin
    sup_c = '0;
    for (int r = 0; r < N_REG; r++) begin
      for (int p = 0; p < NP_MAX; p++) begin
        if (p < region_pairs(r)) begin
          for (int a = 0; a < 2; a++) begin
            for (int b = 0; b < 2; b++) begin
              int ca, cb;
              logic [1:0] v;
              ca = 2 * pair_sector(r, p, 0) + a;
              cb = 2 * pair_sector(r, p, 1) + b;
              v  = slut[r][{pt[ca], pt[cb]}];
              if (ovl_flags[region_flag_ofs(r) + 4*p + 2*a + b]) begin
                sup_c[ca] = sup_c[ca] | v[1];
                sup_c[cb] = sup_c[cb] | v[0];
              end
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      suppress  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) suppress <= sup_c;
    end
  end

endmodule
