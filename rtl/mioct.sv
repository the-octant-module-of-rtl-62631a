// mioct: main FPGA logic of the octant module of the muon-to-central-trigger
// processor interface.
//
// One module serves one half-octant: 13 muon trigger sectors (4 barrel, 6
// end-cap, 3 forward) deliver one 32-bit word each per bunch crossing. The
// module
//   * resynchronises and time-aligns the sector words and checks that they
//     belong to the same bunch crossing (sync_align),
//   * resolves overlaps between adjacent sectors and counts the remaining
//     candidates for six pT thresholds into six 3-bit multiplicities, which
//     go to the backplane adder tree (overlap_handling),
//   * keeps all sector words in a Level-1 pipeline and, on a Level-1 Accept,
//     copies a window of up to +-2 crossings into a derandomizer, then zero-
//     suppresses and formats them into a readout FIFO, sent over the token-
//     passing backplane readout bus, and a monitoring FIFO read over VME
//     (readout_pipeline, zs_formatter, readout_bus_if),
//   * records sector words and trigger results into, or replays test data
//     from, the external snapshot memory (snapshot_ctrl),
//   * is configured through a local bus from the VME interface (reg_bank).
//
// Clocking: everything runs on one 160 MHz clock (four times the bunch clock);
// bc_strobe is high for one clock in every four and marks the bunch-crossing
// boundary. l1a, ecr and bcr are bunch-clock signals: hold them for the whole
// crossing (at least across the clock after bc_strobe).
//
// Trigger latency: a sector word present at the inputs during crossing n
// (sampled at phase 1..3, alignment delay 0) is aligned at the end of crossing
// n, its multiplicities are ready 5 clocks later and appear on mult at the end
// of crossing n+2, i.e. during crossing n+3: 3 bunch crossings from input to
// output, as the document gives. The overlap tables take 3 of those clocks,
// the summing 2.
//
// What is brought out as ports: the sector-logic receivers/drivers
// (sl_data in, sl_drive_* out), the backplane (mult, readout bus, busy,
// timing), the local bus of the VME interface FPGA and the user port of the
// memory-interface core in front of the QDR SRAM chips (mem_*).
module mioct
  import mioct_pkg::*;
#(
  parameter int ALIGN_DEPTH    = 16,
  parameter int L1_DEPTH       = 256,
  parameter int DERAND_DEPTH   = 32,
  parameter int RO_FIFO_DEPTH  = 512,
  parameter int MON_FIFO_DEPTH = 512,
  parameter int SNAP_BC_AW     = 17,
  localparam int PAW    = $clog2(L1_DEPTH),
  localparam int MEM_AW = SNAP_BC_AW + 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               bc_strobe,
  input  logic                               bcr,
  input  logic                               l1a,
  input  logic                               ecr,
  // sector logic
  input  logic [N_SECTORS-1:0][SECTOR_W-1:0] sl_data,
  output logic [N_SECTORS-1:0][SECTOR_W-1:0] sl_drive_data,
  output logic                               sl_drive_en,
  // backplane: trigger
  output mult_t [N_THR-1:0]                  mult,
  // backplane: readout bus
  input  logic                               ro_token_in,
  output logic                               ro_token_out,
  output logic [RO_W-1:0]                    ro_data,
  output logic                               ro_valid,
  output logic                               ro_oe,
  output logic                               busy,
  // local bus from the VME interface
  input  logic [23:0]                        lb_addr,
  input  logic [31:0]                        lb_wdata,
  input  logic                               lb_we,
  input  logic                               lb_re,
  output logic [31:0]                        lb_rdata,
  output logic                               lb_rack,
  // memory-interface user port (snapshot / test memory)
  output logic                               mem_wr,
  output logic [MEM_AW-1:0]                  mem_waddr,
  output logic [143:0]                       mem_wdata,
  output logic                               mem_rd,
  output logic [MEM_AW-1:0]                  mem_raddr,
  input  logic                               mem_rvalid,
  input  logic [143:0]                       mem_rdata
);

  localparam int DLY_W = $clog2(ALIGN_DEPTH + 1);

  // configuration
  logic [N_SECTORS-1:0][1:0]       phase_sel;
  logic [N_SECTORS-1:0][DLY_W-1:0] delay;
  logic                            check_en;
  logic [BCID_W-1:0]               bcid_offset;
  logic                            cfg_we;
  logic [21:0]                     cfg_addr;
  logic [N_THR-1:0]                cfg_wdata;
  logic [PAW-1:0]                  l1_latency;
  logic [1:0]                      win_pre, win_post;

  // bunch counter
  logic [11:0] bcid;

  // trigger path
  logic [N_SECTORS-1:0][SECTOR_W-1:0] sl_in, aligned;
  logic                               aligned_valid;
  logic [N_SECTORS-1:0]               bcid_err;
  logic                               bcid_err_valid;
  mult_t [N_THR-1:0]                  mult_int;
  logic [N_CAND-1:0]                  suppress;
  logic                               oh_valid;

  // readout path
  frame_t              fr_dout;
  logic                fr_empty, fr_pop;
  logic                rp_busy;
  logic [23:0]         l1id;
  logic                ro_push, ro_full, ro_empty, ro_pop, mon_push, mon_empty, mon_full, mon_pop;
  logic [RO_W-1:0]     ro_word, ro_dout, mon_dout;
  logic [$clog2(RO_FIFO_DEPTH):0]  ro_count;
  logic [$clog2(MON_FIFO_DEPTH):0] mon_count, mon_free;
  logic                ev_done;

  // snapshot
  logic [1:0]             snap_mode;
  logic                   snap_start, snap_stop, snap_loop, snap_drive, snap_running, snap_done;
  logic [SNAP_BC_AW:0]    snap_length;
  logic [MEM_AW-1:0]      snap_rb_addr;
  logic                   snap_rb_req, snap_rb_done;
  logic [143:0]           snap_rb_data;
  logic [SNAP_BC_AW-1:0]  snap_bc_addr;
  logic [N_SECTORS-1:0][SECTOR_W-1:0] play_data;
  logic                   play_active, play_drive;

  // Bunch counter: cleared by the bunch counter reset, 3564 crossings per turn.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 bcid <= '0;
    else if (bc_strobe) begin
      if (bcr)                  bcid <= '0;
      else if (bcid == 12'd3563) bcid <= '0;
      else                      bcid <= bcid + 1'b1;
    end
  end

  // Replayed test data take the place of the sector-logic inputs.
  assign sl_in         = play_active ? play_data : sl_data;
  assign sl_drive_data = play_data;
  assign sl_drive_en   = play_drive;

  sync_align #(.ALIGN_DEPTH(ALIGN_DEPTH)) u_sync (
    .clk, .rst_n, .bc_strobe,
    .sl_in, .phase_sel, .delay,
    .bcid_local(bcid[BCID_W-1:0]), .bcid_offset, .check_en,
    .aligned, .aligned_valid, .bcid_err, .bcid_err_valid
  );

  overlap_handling u_oh (
    .clk, .rst_n,
    .in_valid(aligned_valid),
    .sectors(aligned),
    .mult(mult_int),
    .suppress,
    .out_valid(oh_valid),
    .cfg_we, .cfg_addr, .cfg_wdata
  );

  // Multiplicities to the backplane change on bunch-crossing boundaries.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         mult <= '0;
    else if (bc_strobe) mult <= mult_int;
  end

  readout_pipeline #(.L1_DEPTH(L1_DEPTH), .DERAND_DEPTH(DERAND_DEPTH)) u_rp (
    .clk, .rst_n,
    .wr_valid(bcid_err_valid),
    .wr_data(aligned),
    .wr_bcid(bcid),
    .wr_bcid_err(bcid_err),
    .l1a, .ecr,
    .l1_latency, .win_pre, .win_post,
    .fr_dout, .fr_empty, .fr_pop,
    .busy(rp_busy),
    .l1id
  );

  assign mon_free = ($clog2(MON_FIFO_DEPTH)+1)'(MON_FIFO_DEPTH) - mon_count;

  zs_formatter #(.MON_AW($clog2(MON_FIFO_DEPTH))) u_fmt (
    .clk, .rst_n,
    .fr_dout, .fr_empty, .fr_pop,
    .ro_push, .ro_word, .ro_full,
    .mon_push, .mon_free,
    .ev_done
  );

  sync_fifo #(.WIDTH(RO_W), .DEPTH(RO_FIFO_DEPTH)) u_ro_fifo (
    .clk, .rst_n,
    .push(ro_push), .din(ro_word),
    .pop(ro_pop), .dout(ro_dout),
    .empty(ro_empty), .full(ro_full), .count(ro_count)
  );

  sync_fifo #(.WIDTH(RO_W), .DEPTH(MON_FIFO_DEPTH)) u_mon_fifo (
    .clk, .rst_n,
    .push(mon_push), .din(ro_word),
    .pop(mon_pop), .dout(mon_dout),
    .empty(mon_empty), .full(mon_full), .count(mon_count)
  );

  readout_bus_if u_bus (
    .clk, .rst_n,
    .fifo_dout(ro_dout), .fifo_empty(ro_empty), .fifo_pop(ro_pop),
    .ev_pushed(ev_done),
    .token_in(ro_token_in), .token_out(ro_token_out),
    .ro_data, .ro_valid, .ro_oe
  );

  // Busy towards the central trigger: derandomizer or readout FIFO nearly full.
  assign busy = rp_busy || (int'(ro_count) > RO_FIFO_DEPTH - 2 * (2 + 5 * N_CAND));

  snapshot_ctrl #(.BC_AW(SNAP_BC_AW)) u_snap (
    .clk, .rst_n, .bc_strobe,
    .sectors(aligned), .res_valid(oh_valid), .mult(mult_int), .suppress,
    .mode(snap_mode), .start(snap_start), .stop(snap_stop), .loop(snap_loop),
    .drive(snap_drive), .length(snap_length),
    .running(snap_running), .done(snap_done), .bc_addr(snap_bc_addr),
    .play_data, .play_active, .play_drive,
    .rb_addr(snap_rb_addr), .rb_req(snap_rb_req), .rb_data(snap_rb_data), .rb_done(snap_rb_done),
    .mem_wr, .mem_waddr, .mem_wdata, .mem_rd, .mem_raddr, .mem_rvalid, .mem_rdata
  );

  reg_bank #(.ALIGN_DEPTH(ALIGN_DEPTH), .PAW(PAW), .BC_AW(SNAP_BC_AW)) u_regs (
    .clk, .rst_n,
    .lb_addr, .lb_wdata, .lb_we, .lb_re, .lb_rdata, .lb_rack,
    .phase_sel, .delay, .check_en, .bcid_offset,
    .bcid_err, .bcid_err_valid,
    .cfg_we, .cfg_addr, .cfg_wdata,
    .l1_latency, .win_pre, .win_post,
    .busy, .l1id,
    .mon_dout, .mon_empty, .mon_pop,
    .snap_mode, .snap_start, .snap_stop, .snap_loop, .snap_drive, .snap_length,
    .snap_rb_addr, .snap_rb_req,
    .snap_running, .snap_done, .snap_bc_addr, .snap_rb_data, .snap_rb_done
  );

endmodule
