// snapshot_ctrl: control of the snapshot / test-data memory.
//
// The memory (two 1M x 36 QDR-II SRAM chips behind a memory-interface core)
// is seen through that core's user port: independent read and write ports of
// 144 bits per 160 MHz clock (72 bits double data rate, burst of two), i.e.
// 2**19 words, four words per bunch crossing, 128K bunch crossings in all.
//
// Record: after start (mode 1) the controller stores, for each of `length`
// consecutive bunch crossings, a 460-bit record of the 13 aligned sector
// words, the six multiplicities and the 26 suppress flags, as four 144-bit
// words at address {bc, beat[1:0]}. The sector words are delayed by
// RES_LAG clocks so they meet the trigger results of the same crossing.
// Replay: after start (mode 2) it reads the stored crossings back and presents
// their sector words on play_data, one crossing per bunch crossing, with
// play_active high; the top uses them in place of the sector-logic inputs,
// and play_drive asks for the bidirectional input buffers to drive them out
// (to test another module through its cables). With loop set, replay wraps
// around. Readback: with no replay running, rb_req reads word rb_addr into
// rb_data for the VME bus.
//
// Timing: record writes one memory word per clock; replay reads ahead one
// memory word per clock and buffers up to four crossings, so any fixed read
// latency of the memory core is hidden after the start.
//
// The document gives the memory size, its content (13 sectors, multiplicity,
// suppress flags), the 128K-crossing depth and the replay use; the record
// layout, the command set and the buffering are this design's choices.
module snapshot_ctrl
  import mioct_pkg::*;
#(
  parameter int BC_AW   = 17,   // 128K bunch crossings
  parameter int RES_LAG = 5,    // clocks from sector words to trigger results
  localparam int MEM_AW = BC_AW + 2,
  localparam int MEM_DW = 144,
  localparam int REC_W  = N_SECTORS * SECTOR_W + N_THR * MULT_W + N_CAND
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               bc_strobe,
  // data to record
  input  logic [N_SECTORS-1:0][SECTOR_W-1:0] sectors,
  input  logic                               res_valid,
  input  mult_t [N_THR-1:0]                  mult,
  input  logic [N_CAND-1:0]                  suppress,
  // control
  input  logic [1:0]                         mode,      // 1 record, 2 replay
  input  logic                               start,
  input  logic                               stop,
  input  logic                               loop,
  input  logic                               drive,
  input  logic [BC_AW:0]                     length,    // crossings, 1..2**BC_AW
  output logic                               running,
  output logic                               done,
  output logic [BC_AW-1:0]                   bc_addr,
  // replay output
  output logic [N_SECTORS-1:0][SECTOR_W-1:0] play_data,
  output logic                               play_active,
  output logic                               play_drive,
  // readback
  input  logic [MEM_AW-1:0]                  rb_addr,
  input  logic                               rb_req,
  output logic [MEM_DW-1:0]                  rb_data,
  output logic                               rb_done,
  // memory-interface user port
  output logic                               mem_wr,
  output logic [MEM_AW-1:0]                  mem_waddr,
  output logic [MEM_DW-1:0]                  mem_wdata,
  output logic                               mem_rd,
  output logic [MEM_AW-1:0]                  mem_raddr,
  input  logic                               mem_rvalid,
  input  logic [MEM_DW-1:0]                  mem_rdata
);

  localparam int PLAY_BUF = 4;

  logic [N_SECTORS-1:0][SECTOR_W-1:0] sec_dly [RES_LAG];
  logic [4*MEM_DW-1:0] rec;
  logic [1:0]  wbeat;
  logic        wbusy;
  logic        rec_run, play_run;
  logic [BC_AW-1:0] wbc, rbc;
  logic [1:0]  rbeat_iss, rbeat_ret;
  logic [3*MEM_DW-1:0] asm_buf;
  logic [2:0]  inflight;     // crossings whose reads are issued, not yet buffered
  logic        rb_pend;
  logic        rb_issued;
  logic        play_end;
  // replay buffer
  logic        pb_push, pb_pop, pb_empty, pb_full;
  logic [N_SECTORS*SECTOR_W-1:0] pb_din, pb_dout;
  logic [$clog2(PLAY_BUF):0] pb_count;

  assign running = rec_run || play_run;
  assign bc_addr = rec_run ? wbc : rbc;

  // Delay the sector words to meet the trigger results.
  always_ff @(posedge clk) begin
    sec_dly[0] <= sectors;
    for (int i = 1; i < RES_LAG; i++) sec_dly[i] <= sec_dly[i-1];
  end

  // ---------------- record ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_run <= 1'b0;
      wbc     <= '0;
      wbeat   <= '0;
      wbusy   <= 1'b0;
      rec     <= '0;
      done    <= 1'b0;
    end else begin
      if (start && mode == 2'd1) begin
        rec_run <= 1'b1;
        wbc     <= '0;
        done    <= 1'b0;
      end
      if (wbusy) begin
        wbeat <= wbeat + 1'b1;
        if (wbeat == 2'd3) begin
          wbusy <= 1'b0;
          wbc   <= wbc + 1'b1;
          if ({1'b0, wbc} == length - 1'b1) begin
            rec_run <= 1'b0;
            done    <= 1'b1;
          end
        end
      end
      // A new crossing arrives every four clocks, as the previous one's last
      // word is written. sec_dly[RES_LAG-2] holds the sector words of the
      // crossing whose results arrive now.
      if (rec_run && res_valid && !(wbusy && wbeat == 2'd3 && {1'b0, wbc} == length - 1'b1)) begin
        rec   <= (4*MEM_DW)'(REC_W'({suppress, mult, sec_dly[RES_LAG-2]}));
        wbusy <= 1'b1;
        wbeat <= '0;
      end
      if (stop) rec_run <= 1'b0;
      if (play_end) done <= 1'b1;
      if (start && mode == 2'd2) done <= 1'b0;
    end
  end

  assign mem_wr    = wbusy;
  assign mem_waddr = {wbc, wbeat};
  assign mem_wdata = rec[int'(wbeat)*MEM_DW +: MEM_DW];

  // ---------------- replay ----------------
  logic             issue;
  logic             last_issued;

  assign play_end = play_run && last_issued && inflight == '0 && pb_empty && !play_active;
  assign issue = play_run && !last_issued && (int'(pb_count) + int'(inflight) < PLAY_BUF);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play_run    <= 1'b0;
      rbc         <= '0;
      rbeat_iss   <= '0;
      last_issued <= 1'b0;
      inflight    <= '0;
    end else begin
      if (start && mode == 2'd2) begin
        play_run    <= 1'b1;
        rbc         <= '0;
        rbeat_iss   <= '0;
        last_issued <= 1'b0;
      end else if (issue) begin
        rbeat_iss <= rbeat_iss + 1'b1;
        if (rbeat_iss == 2'd3) begin
          if ({1'b0, rbc} == length - 1'b1) begin
            rbc <= '0;
            if (!loop) last_issued <= 1'b1;
          end else begin
            rbc <= rbc + 1'b1;
          end
        end
      end
      inflight <= inflight + 3'(issue && rbeat_iss == 2'd3) - 3'(pb_push);
      if (stop || play_end) play_run <= 1'b0;
    end
  end

  // Assemble returning words; outside a replay a returning word is readback data.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbeat_ret <= '0;
      asm_buf   <= '0;
      rb_data   <= '0;
      rb_done   <= 1'b0;
      rb_pend   <= 1'b0;
    end else begin
      rb_done <= 1'b0;
      if (rb_req && !play_run) rb_pend <= 1'b1;
      if (mem_rvalid) begin
        if (play_run) begin
          rbeat_ret <= rbeat_ret + 1'b1;
          if (rbeat_ret != 2'd3) asm_buf[int'(rbeat_ret)*MEM_DW +: MEM_DW] <= mem_rdata;
        end else begin
          rb_data <= mem_rdata;
          rb_done <= 1'b1;
          rb_pend <= 1'b0;
        end
      end
      if (start && mode == 2'd2) rbeat_ret <= '0;
    end
  end

  assign mem_rd    = issue || (rb_pend && !play_run && !rb_issued);
  assign mem_raddr = issue ? {rbc, rbeat_iss} : rb_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      rb_issued <= 1'b0;
    else if (mem_rvalid && !play_run) rb_issued <= 1'b0;
    else if (mem_rd && !issue)       rb_issued <= 1'b1;
  end

  // The sector words of a crossing occupy the first 416 of its 576 bits,
  // i.e. words 0..2 fully (432 bits), so beat 3 carries no sector data.
  assign pb_push = play_run && mem_rvalid && rbeat_ret == 2'd3;
  assign pb_din  = asm_buf[N_SECTORS*SECTOR_W-1:0];

  sync_fifo #(.WIDTH(N_SECTORS*SECTOR_W), .DEPTH(PLAY_BUF)) u_pbuf (
    .clk, .rst_n,
    .push(pb_push), .din(pb_din),
    .pop(pb_pop), .dout(pb_dout),
    .empty(pb_empty), .full(pb_full), .count(pb_count)
  );

  assign pb_pop = bc_strobe && !pb_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      play_data   <= '0;
      play_active <= 1'b0;
    end else if (bc_strobe) begin
      play_active <= !pb_empty;
      if (!pb_empty) play_data <= pb_dout;
    end
  end

  assign play_drive = play_active && drive;

  a_no_write_during_replay: assert property (@(posedge clk) disable iff (!rst_n)
    !(rec_run && play_run));

endmodule
