// mioct_pkg: types and constants shared by the octant-module (MIOCT) logic.
//
// The module receives 13 sector-logic words of 32 bits per bunch crossing
// (4 barrel, 6 end-cap and 3 forward sectors of one half-octant), each word
// holding up to two muon candidates, 26 candidates in all. Overlaps between
// adjacent sectors are resolved before the candidates are counted for six
// pT thresholds into six 3-bit multiplicities.
//
// Sector count, word width, candidate count, threshold count, multiplicity
// width and the overlap flag counts per region (8 BA-BA, 32 BA-EC, 20 EC-EC,
// 8 FW-FW) follow the document. The bit layout of a sector word, the order of
// the sectors and the readout word format are this design's own choices:
//
//   sector word [11:0]  candidate 0 = {sign, pt[2:0], roi[7:0]}
//               [23:12] candidate 1 (same layout)
//               [26:24] bcid[2:0], low bits of the bunch-crossing number
//               [31:27] flags, carried to the readout only
//   pt = 0 means "no candidate", 1..6 is the highest threshold passed.
package mioct_pkg;

  localparam int N_SECTORS = 13;
  localparam int SECTOR_W  = 32;
  localparam int N_CAND    = 2 * N_SECTORS;  // 26 candidates
  localparam int N_THR     = 6;              // pT thresholds
  localparam int MULT_W    = 3;              // bits per multiplicity
  localparam int ROI_W     = 8;
  localparam int PT_W      = 3;
  localparam int BCID_W    = 3;
  localparam int SFLAG_W   = 5;
  localparam int ZONE_W    = 3;              // overlap zone code, 0 = none
  localparam int RO_W      = 36;             // readout bus word

  // Sector order as printed on the front panel (left to right in the block diagram).
  typedef enum logic [3:0] {
    BA31 = 4'd0, BA32 = 4'd1, BA01 = 4'd2, BA02 = 4'd3,
    EC47 = 4'd4, EC00 = 4'd5, EC01 = 4'd6, EC02 = 4'd7, EC03 = 4'd8, EC04 = 4'd9,
    FW00 = 4'd10, FW01 = 4'd11, FW02 = 4'd12
  } sector_e;

  typedef struct packed {
    logic             sign;
    logic [PT_W-1:0]  pt;
    logic [ROI_W-1:0] roi;
  } cand_t;   // 12 bits

  typedef struct packed {
    logic [SFLAG_W-1:0] flags;
    logic [BCID_W-1:0]  bcid;
    cand_t              c1;
    cand_t              c0;
  } sector_word_t;  // 32 bits

  typedef logic [MULT_W-1:0] mult_t;

  // Overlap regions and their sector pairs (A side, B side).
  localparam int REG_BABA = 0, REG_BAEC = 1, REG_ECEC = 2, REG_FWFW = 3;
  localparam int N_REG = 4;
  localparam int NP_BABA = 2, NP_BAEC = 8, NP_ECEC = 5, NP_FWFW = 2;
  localparam int N_FLAGS = 4 * (NP_BABA + NP_BAEC + NP_ECEC + NP_FWFW);  // 68

  typedef int unsigned pair_list_t [8][2];

  // Unused trailing entries are zero.
  localparam pair_list_t PAIRS_BABA = '{'{0, 1}, '{2, 3}, '{0, 0}, '{0, 0},
                                        '{0, 0}, '{0, 0}, '{0, 0}, '{0, 0}};
  localparam pair_list_t PAIRS_BAEC = '{'{0, 4}, '{0, 5}, '{1, 5}, '{1, 6},
                                        '{2, 7}, '{2, 8}, '{3, 8}, '{3, 9}};
  localparam pair_list_t PAIRS_ECEC = '{'{4, 5}, '{5, 6}, '{6, 7}, '{7, 8},
                                        '{8, 9}, '{0, 0}, '{0, 0}, '{0, 0}};
  localparam pair_list_t PAIRS_FWFW = '{'{10, 11}, '{11, 12}, '{0, 0}, '{0, 0},
                                        '{0, 0}, '{0, 0}, '{0, 0}, '{0, 0}};

  // Number of sector pairs, first flag index and sector of a pair side, by region.
  function automatic int region_pairs(input int r);
    case (r)
      REG_BABA: return NP_BABA;
      REG_BAEC: return NP_BAEC;
      REG_ECEC: return NP_ECEC;
      default:  return NP_FWFW;
    endcase
  endfunction

  function automatic int region_flag_ofs(input int r);
    int ofs;
    ofs = 0;
    for (int i = 0; i < r; i++) ofs += 4 * region_pairs(i);
    return ofs;
  endfunction

  function automatic int pair_sector(input int r, input int p, input int side);
    case (r)
      REG_BABA: return int'(PAIRS_BABA[p][side]);
      REG_BAEC: return int'(PAIRS_BAEC[p][side]);
      REG_ECEC: return int'(PAIRS_ECEC[p][side]);
      default:  return int'(PAIRS_FWFW[p][side]);
    endcase
  endfunction

  // One bunch crossing of one triggered event in the derandomizer.
  typedef struct packed {
    logic                               first;     // first BC of the readout window
    logic                               last;      // last BC of the readout window
    logic [2:0]                         win;       // position in the window, 0 = earliest
    logic [23:0]                        l1id;      // event number
    logic [11:0]                        bcid;      // bunch number of this BC
    logic [N_SECTORS-1:0]               bcid_err;  // alignment check result of this BC
    logic [N_SECTORS-1:0][SECTOR_W-1:0] data;
  } frame_t;

  // Readout word types in bits [35:33].
  localparam logic [2:0] RO_HEADER  = 3'b100;
  localparam logic [2:0] RO_CAND    = 3'b001;
  localparam logic [2:0] RO_TRAILER = 3'b111;

endpackage
