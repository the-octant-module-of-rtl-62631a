// sync_align: resynchronisation and time alignment of the 13 sector-logic words.
//
// Each sector word arrives at the bunch-crossing (BC) rate with its own clock
// phase. The 160 MHz system clock samples it four times per BC; a per-sector
// phase register (phase_sel) picks the sample taken at phase_sel clock cycles
// after the BC strobe, which is then moved into the system BC register on the
// next BC strobe. A per-sector programmable delay of 0..ALIGN_DEPTH+1 BCs then
// lines all sectors up on the same bunch crossing, compensating different
// detector electronics and cable latencies. Finally the 3-bit BCID field of
// every aligned word is compared with the low bits of the local bunch counter minus a
// programmable offset, and a mismatch raises that sector's bcid_err bit.
//
// Timing: aligned loads at the clock edge that ends the bc_strobe cycle, with
// the word sampled in the BC just ending (delay 0) or 1..ALIGN_DEPTH+1 BCs
// earlier (larger settings read the last tap). aligned_valid is a one-cycle
// pulse after that edge; the data then hold for the whole BC. bcid_err
// follows aligned by one clock.
//
// The document says that the words are resynchronised, aligned in time and
// that the alignment is checked; the phase-select sampling, the delay line
// and the BCID-field comparison are this design's choices.
module sync_align
  import mioct_pkg::*;
#(
  parameter int ALIGN_DEPTH = 16,
  localparam int DLY_W = $clog2(ALIGN_DEPTH + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         bc_strobe,
  input  logic [N_SECTORS-1:0][SECTOR_W-1:0] sl_in,
  input  logic [N_SECTORS-1:0][1:0]    phase_sel,
  input  logic [N_SECTORS-1:0][DLY_W-1:0] delay,
  input  logic [BCID_W-1:0]            bcid_local,
  input  logic [BCID_W-1:0]            bcid_offset,
  input  logic                         check_en,
  output logic [N_SECTORS-1:0][SECTOR_W-1:0] aligned,
  output logic                         aligned_valid,
  output logic [N_SECTORS-1:0]         bcid_err,
  output logic                         bcid_err_valid
);

  logic [1:0] phase;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] cap, sys;
  logic [SECTOR_W-1:0] dline [N_SECTORS][ALIGN_DEPTH];
  logic [BCID_W-1:0] bcid_exp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= bc_strobe ? 2'd1 : phase + 2'd1;
  end

  // Per-sector sampling phase, then transfer into the system BC domain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap <= '0;
      sys <= '0;
    end else begin
      for (int s = 0; s < N_SECTORS; s++) begin
        if ((bc_strobe ? 2'd0 : phase) == phase_sel[s]) cap[s] <= sl_in[s];
      end
      if (bc_strobe) sys <= cap;
    end
  end

  // Alignment delay line, one tap per BC.
  always_ff @(posedge clk) begin
    if (bc_strobe) begin
      for (int s = 0; s < N_SECTORS; s++) begin
        dline[s][0] <= sys[s];
        for (int d = 1; d < ALIGN_DEPTH; d++) dline[s][d] <= dline[s][d-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aligned       <= '0;
      aligned_valid <= 1'b0;
    end else begin
      aligned_valid <= bc_strobe;
      if (bc_strobe) begin
        for (int s = 0; s < N_SECTORS; s++) begin
          // Values before this edge: cap is the newest sample, sys the one of
          // the BC before, and tap k of the delay line the one k+2 BCs back.
          if (delay[s] == '0)      aligned[s] <= cap[s];
          else if (delay[s] == 1)  aligned[s] <= sys[s];
          else if (int'(delay[s]) - 2 < ALIGN_DEPTH) aligned[s] <= dline[s][delay[s]-2];
          else                     aligned[s] <= dline[s][ALIGN_DEPTH-1];
        end
      end
    end
  end

  assign bcid_exp = bcid_local - bcid_offset;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid_err       <= '0;
      bcid_err_valid <= 1'b0;
    end else begin
      bcid_err_valid <= aligned_valid;
      if (aligned_valid) begin
        for (int s = 0; s < N_SECTORS; s++) begin
          sector_word_t w;
          w = sector_word_t'(aligned[s]);
          bcid_err[s] <= check_en && (w.bcid != bcid_exp);
        end
      end
    end
  end

endmodule
