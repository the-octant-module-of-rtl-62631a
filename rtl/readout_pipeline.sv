// readout_pipeline: Level-1 pipeline memory and derandomizer of the readout path.
//
// Every bunch crossing the 13 aligned sector words, the bunch number and the
// alignment-check flags are written into a circular pipeline memory of
// L1_DEPTH bunch crossings, which holds them for the Level-1 trigger latency.
// On a Level-1 Accept (l1a, sampled on a wr_valid cycle) the crossing written
// l1_latency crossings before the current one is the triggered one; a request
// for the window [trigger - win_pre, trigger + win_post] (each 0..2) is queued.
// A reader takes one request at a time and copies the window, one crossing per
// clock, into the derandomizer FIFO, tagging first/last crossing, position in
// the window and the event number. The event number counts Level-1 Accepts
// and is cleared by ecr (event counter reset).
//
// Crossings after the trigger are read only once they are written: the reader
// waits until win_post further crossings have arrived. busy is raised when
// the derandomizer has room for less than one more full window.
//
// Timing: pipeline writes on wr_valid; derandomizer entries appear from a few
// clocks after the last crossing of the window has been written.
//
// The document gives the pipeline memories, the derandomizer and the +-2 BC
// programmable window. Depths, the request queue and the busy rule are this
// design's choices.
module readout_pipeline
  import mioct_pkg::*;
#(
  parameter int L1_DEPTH     = 256,
  parameter int DERAND_DEPTH = 32,
  parameter int REQ_DEPTH    = 8,
  localparam int PAW = $clog2(L1_DEPTH)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               wr_valid,
  input  logic [N_SECTORS-1:0][SECTOR_W-1:0] wr_data,
  input  logic [11:0]                        wr_bcid,
  input  logic [N_SECTORS-1:0]               wr_bcid_err,
  input  logic                               l1a,
  input  logic                               ecr,
  input  logic [PAW-1:0]                     l1_latency,
  input  logic [1:0]                         win_pre,
  input  logic [1:0]                         win_post,
  output frame_t                             fr_dout,
  output logic                               fr_empty,
  input  logic                               fr_pop,
  output logic                               busy,
  output logic [23:0]                        l1id
);

  localparam int WIN_MAX = 5;   // longest readout window, crossings
  localparam int PW = 12 + N_SECTORS + N_SECTORS * SECTOR_W;
  typedef struct packed {
    logic [PAW-1:0] start;
    logic [2:0]     len;
    logic [23:0]    l1id;
  } req_t;

  logic [PW-1:0]  pmem [L1_DEPTH];
  logic [PAW-1:0] wptr;

  // request queue
  req_t req_in, req_head;
  logic req_empty, req_full;
  logic req_pop;
  logic [$clog2(REQ_DEPTH):0] req_count;

  // reader
  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_READ} rstate_e;
  rstate_e rstate;
  logic [PAW-1:0] raddr;
  logic [2:0]     ridx, rlen;
  logic [23:0]    rl1id;
  logic [PAW-1:0] rlast;       // address of the last crossing of the window
  logic [PAW-1:0] wr_ahead;
  logic           win_written;
  logic           rd_v;
  logic [2:0]     rd_idx;
  logic [PW-1:0]  rd_q;
  frame_t         fr_din;
  logic           fr_full;
  logic [$clog2(DERAND_DEPTH):0] fr_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
    end else if (wr_valid) begin
      wptr <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) pmem[wptr] <= {wr_bcid, wr_bcid_err, wr_data};
  end

  // Event counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                l1id <= '0;
    else if (ecr)              l1id <= '0;
    else if (l1a && wr_valid)  l1id <= l1id + 1'b1;
  end

  // Trigger crossing = the crossing being written now, minus the latency.
  assign req_in.start = wptr - l1_latency - PAW'(win_pre);
  assign req_in.len   = 3'(win_pre) + 3'(win_post) + 3'd1;
  assign req_in.l1id  = l1id;

  sync_fifo #(.WIDTH($bits(req_t)), .DEPTH(REQ_DEPTH)) u_req (
    .clk, .rst_n,
    .push(l1a && wr_valid), .din(req_in),
    .pop(req_pop), .dout(req_head),
    .empty(req_empty), .full(req_full), .count(req_count)
  );

  assign req_pop = (rstate == R_IDLE) && !req_empty;

  // Reader
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_IDLE;
      raddr  <= '0;
      ridx   <= '0;
      rlen   <= '0;
      rl1id  <= '0;
      rlast  <= '0;
      rd_v   <= 1'b0;
      rd_idx <= '0;
    end else begin
      rd_v <= 1'b0;
      case (rstate)
        R_IDLE: if (!req_empty) begin
          raddr  <= req_head.start;
          rlen   <= req_head.len;
          rl1id  <= req_head.l1id;
          rlast  <= req_head.start + PAW'(req_head.len) - 1'b1;
          ridx   <= '0;
          rstate <= R_WAIT;
        end
        // Wait until the last crossing of the window has been written and
        // there is room in the derandomizer for the whole window.
        R_WAIT: if (win_written && (DERAND_DEPTH - int'(fr_count) >= WIN_MAX + 2)) rstate <= R_READ;
        R_READ: begin
          rd_v   <= 1'b1;
          rd_idx <= ridx;
          raddr  <= raddr + 1'b1;
          ridx   <= ridx + 1'b1;
          if (ridx == rlen - 1'b1) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // The last crossing of the window is in memory once the write pointer has
  // moved past it (wptr - rlast is 1 when rlast was the latest write).
  assign wr_ahead    = wptr - rlast;
  assign win_written = (wr_ahead != '0) && (int'(wr_ahead) <= L1_DEPTH / 2);

  always_ff @(posedge clk) begin
    rd_q <= pmem[raddr];
  end

  // rd_q lags raddr by one clock; keep the frame tags in step with it.
  logic [2:0]  q_len;
  logic [23:0] q_l1id;
  always_ff @(posedge clk) begin
    q_len  <= rlen;
    q_l1id <= rl1id;
  end

  always_comb begin
    fr_din.first    = (rd_idx == '0);
    fr_din.last     = (rd_idx == q_len - 1'b1);
    fr_din.win      = rd_idx;
    fr_din.l1id     = q_l1id;
    fr_din.bcid     = rd_q[PW-1 -: 12];
    fr_din.bcid_err = rd_q[N_SECTORS*SECTOR_W +: N_SECTORS];
    fr_din.data     = rd_q[N_SECTORS*SECTOR_W-1:0];
  end

  sync_fifo #(.WIDTH($bits(frame_t)), .DEPTH(DERAND_DEPTH)) u_derand (
    .clk, .rst_n,
    .push(rd_v), .din(fr_din),
    .pop(fr_pop), .dout(fr_dout),
    .empty(fr_empty), .full(fr_full), .count(fr_count)
  );

  assign busy = (DERAND_DEPTH - int'(fr_count) < 2 * WIN_MAX) || req_full;

endmodule
