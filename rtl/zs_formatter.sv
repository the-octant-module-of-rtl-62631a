// zs_formatter: zero suppression and formatting of the readout data.
//
// Takes the derandomizer frames (one bunch crossing of one triggered event
// each) and writes 36-bit readout words for every event:
//   header    {3'b100, 1'b0, bcid[7:0], l1id[23:0]}   bcid of the first crossing
//   candidate {3'b001, win[2:0], sector[3:0], k, 5'b0, flags[4:0], bcid[2:0], cand[11:0]}
//             one word for each candidate with pT /= 0 (zero suppression),
//             k = candidate 0/1 of the sector, win = crossing in the window
//   trailer   {3'b111, 8'b0, bcid_err[12:0], word_count[11:0]}
//             bcid_err = OR of the alignment-check flags over the window,
//             word_count includes header and trailer.
// The words go to the readout FIFO (ro_*), which may stall the formatter, and,
// for whole events only, to the monitoring FIFO (mon_*): an event is copied
// there when, at its header, the monitoring FIFO has room for the longest
// possible event; otherwise it is skipped. ev_done pulses with the trailer.
//
// Timing: one candidate is examined per clock, 26 clocks per crossing plus
// one clock each for header and trailer.
//
// The document says the derandomized data are zero-suppressed, formatted and
// buffered for the backplane and the VME monitoring; the word format and the
// monitoring policy are this design's choices.
module zs_formatter
  import mioct_pkg::*;
#(
  parameter int MON_AW = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  frame_t            fr_dout,
  input  logic              fr_empty,
  output logic              fr_pop,
  output logic              ro_push,
  output logic [RO_W-1:0]   ro_word,
  input  logic              ro_full,
  output logic              mon_push,
  input  logic [MON_AW:0]   mon_free,
  output logic              ev_done
);

  localparam int MAX_WORDS = 2 + 5 * N_CAND;

  typedef enum logic [1:0] {F_IDLE, F_CAND, F_TRAILER} fstate_e;
  fstate_e state;
  logic [4:0]  ci;
  logic [11:0] wcount;
  logic [N_SECTORS-1:0] err_acc;
  logic        mon_copy;

  sector_word_t sw;
  cand_t        cur;
  logic [3:0]   sec;

  always_comb begin
    sec = 4'(ci >> 1);
    sw  = sector_word_t'(fr_dout.data[sec]);
    cur = ci[0] ? sw.c1 : sw.c0;
  end

  always_comb begin
    ro_push = 1'b0;
    ro_word = '0;
    fr_pop  = 1'b0;
    ev_done = 1'b0;
    case (state)
      F_IDLE: if (!fr_empty && fr_dout.first) begin
        ro_push = !ro_full;
        ro_word = {RO_HEADER, 1'b0, fr_dout.bcid[7:0], fr_dout.l1id};
      end
      F_CAND: if (!fr_empty) begin
        if (cur.pt != '0) begin
          ro_push = !ro_full;
          ro_word = {RO_CAND, fr_dout.win, sec, ci[0], 5'b0, sw.flags, sw.bcid, cur};
        end
        fr_pop = (ci == 5'(N_CAND - 1)) && (cur.pt == '0 || !ro_full);
      end
      F_TRAILER: begin
        ro_push = !ro_full;
        ro_word = {RO_TRAILER, 8'b0, err_acc, wcount + 12'd1};
        ev_done = !ro_full;
      end
      default: ;
    endcase
  end

  assign mon_push = ro_push && (state == F_IDLE ? (int'(mon_free) >= MAX_WORDS) : mon_copy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= F_IDLE;
      ci       <= '0;
      wcount   <= '0;
      err_acc  <= '0;
      mon_copy <= 1'b0;
    end else begin
      case (state)
        F_IDLE: if (!fr_empty) begin
          if (!fr_dout.first) begin
            state <= F_CAND;             // continuation crossing
            ci    <= '0;
          end else if (!ro_full) begin
            mon_copy <= (int'(mon_free) >= MAX_WORDS);
            wcount   <= 12'd1;
            err_acc  <= '0;
            ci       <= '0;
            state    <= F_CAND;
          end
        end
        F_CAND: if (!fr_empty && (cur.pt == '0 || !ro_full)) begin
          if (cur.pt != '0) wcount <= wcount + 1'b1;
          if (ci == 5'(N_CAND - 1)) begin
            err_acc <= err_acc | fr_dout.bcid_err;
            ci      <= '0;
            state   <= fr_dout.last ? F_TRAILER : F_CAND;
          end else begin
            ci <= ci + 1'b1;
          end
        end
        F_TRAILER: if (!ro_full) state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end

endmodule
