// mioct_ref_pkg: reference model of the overlap handling and multiplicity
// summing, used by the testbenches to work out expected results independently
// of the RTL. It holds its own copy of every look-up table, its own list of
// the sector pairs of each overlap region, and computes suppress flags and
// multiplicities in the most direct way (loops over all candidate pairs).
// Table address layout is the one documented in overlap_handling/ovl_detect.
package mioct_ref_pkg;

  // sector pairs: [region][pair] = {A, B}; regions BA-BA, BA-EC, EC-EC, FW-FW
  int npairs [4] = '{2, 8, 5, 2};
  int pa [4][8] = '{'{0, 2, 0, 0, 0, 0, 0, 0}, '{0, 0, 1, 1, 2, 2, 3, 3},
                    '{4, 5, 6, 7, 8, 0, 0, 0}, '{10, 11, 0, 0, 0, 0, 0, 0}};
  int pb [4][8] = '{'{1, 3, 0, 0, 0, 0, 0, 0}, '{4, 5, 5, 6, 7, 8, 8, 9},
                    '{5, 6, 7, 8, 9, 0, 0, 0}, '{11, 12, 0, 0, 0, 0, 0, 0}};

  class mioct_ref;
    bit [2:0] zlut [4][16][256];   // [region][2*pair+side][roi]
    bit       plut [4][8][16384];  // [region][pair][index]
    bit [1:0] slut [4][64];        // [region][{pt_a, pt_b}]
    bit [5:0] tlut [8];            // threshold masks

    // Random zone tables (zone /= 0 with probability zone_pct %), random pair
    // tables (set with probability pair_pct %), suppress-the-lower-pT tables
    // (ties suppress B) and inclusive threshold masks.
    function void make_luts(int zone_pct, int pair_pct);
      for (int r = 0; r < 4; r++) begin
        for (int i = 0; i < 16; i++)
          for (int a = 0; a < 256; a++)
            zlut[r][i][a] = (($urandom % 100) < zone_pct) ? 3'(1 + $urandom % 7) : 3'd0;
        for (int p = 0; p < 8; p++)
          for (int x = 0; x < 16384; x++)
            plut[r][p][x] = (($urandom % 100) < pair_pct);
        for (int x = 0; x < 64; x++) begin
          int ta, tb;
          ta = x / 8;
          tb = x % 8;
          slut[r][x] = (ta < tb) ? 2'b10 : 2'b01;
        end
      end
      for (int t = 0; t < 8; t++) tlut[t] = 6'((1 << t) - 1) ;  // pT n counts for 1..n
      tlut[7] = 6'b111111;
    endfunction

    // Table writes for the overlap-handling configuration port (22-bit address).
    function void build_cfg(ref int unsigned addr[$], ref int unsigned data[$]);
      addr.delete();
      data.delete();
      for (int r = 0; r < 4; r++) begin
        for (int p = 0; p < npairs[r]; p++) begin
          for (int sd = 0; sd < 2; sd++)
            for (int a = 0; a < 256; a++) begin
              addr.push_back((r << 19) | (p << 9) | (sd << 8) | a);
              data.push_back(zlut[r][2*p+sd][a]);
            end
          for (int x = 0; x < ((r == 1) ? 16384 : 64); x++) begin
            addr.push_back((r << 19) | (1 << 18) | (p << 14) | x);
            data.push_back(plut[r][p][x]);
          end
        end
        for (int x = 0; x < 64; x++) begin
          addr.push_back((4 << 19) | (r << 6) | x);
          data.push_back(slut[r][x]);
        end
      end
      for (int t = 0; t < 8; t++) begin
        addr.push_back((5 << 19) | t);
        data.push_back(tlut[t]);
      end
    endfunction

    function void compute(input logic [12:0][31:0] sec,
                          output logic [5:0][2:0] mult, output logic [25:0] sup);
      bit [7:0] roi [26];
      bit [2:0] pt [26];
      bit       sg [26];
      int cnt [6];
      for (int c = 0; c < 26; c++) begin
        logic [11:0] w;
        w = sec[c / 2][12 * (c % 2) +: 12];
        roi[c] = w[7:0];
        pt[c]  = w[10:8];
        sg[c]  = w[11];
      end
      sup = '0;
      for (int r = 0; r < 4; r++)
        for (int p = 0; p < npairs[r]; p++)
          for (int a = 0; a < 2; a++)
            for (int b = 0; b < 2; b++) begin
              int ca, cb, idx;
              bit [2:0] za, zb;
              ca = 2 * pa[r][p] + a;
              cb = 2 * pb[r][p] + b;
              za = zlut[r][2*p][roi[ca]];
              zb = zlut[r][2*p+1][roi[cb]];
              if (r == 1) idx = {za, zb, pt[ca], pt[cb], sg[ca], sg[cb]};
              else        idx = {za, zb};
              if (pt[ca] != 0 && pt[cb] != 0 && plut[r][p][idx]) begin
                bit [1:0] v;
                v = slut[r][{pt[ca], pt[cb]}];
                if (v[1]) sup[ca] = 1'b1;
                if (v[0]) sup[cb] = 1'b1;
              end
            end
      for (int t = 0; t < 6; t++) cnt[t] = 0;
      for (int c = 0; c < 26; c++)
        if (!sup[c])
          for (int t = 0; t < 6; t++) if (tlut[pt[c]][t]) cnt[t]++;
      for (int t = 0; t < 6; t++) mult[t] = (cnt[t] > 7) ? 3'd7 : 3'(cnt[t]);
    endfunction
  endclass

  // Random sector word: each candidate present with probability cand_pct %,
  // roi drawn from 0..roi_range-1.
  function automatic logic [31:0] rand_sector(int cand_pct, int roi_range, logic [2:0] bcid);
    logic [11:0] c [2];
    for (int k = 0; k < 2; k++) begin
      c[k] = '0;
      if (($urandom % 100) < cand_pct)
        c[k] = {1'($urandom), 3'(1 + $urandom % 6), 8'($urandom % roi_range)};
    end
    return {5'($urandom), bcid, c[1], c[0]};
  endfunction

endpackage
