// reg_bank: control and status registers on the local bus from the VME interface.
//
// The VMEbus interface sits in a separate small FPGA; towards this logic it
// offers a simple local bus: word address lb_addr, write data, one-clock
// write and read strobes, and read data returned with lb_rack one clock after
// lb_re. Word address map:
//   0x000000 CTRL       [0] BCID check enable, [3:1] BCID offset,
//                       [5:4] window before trigger, [7:6] window after (0..2)
//   0x000001 L1LAT      [7:0] Level-1 latency in bunch crossings
//   0x000002 STATUS  r  [0] busy, [1] snapshot running, [2] snapshot done
//   0x000003 BCIDERR    [12:0] sticky alignment errors, write 1 to clear
//   0x000004 L1ID    r  [23:0] event number
//   0x000010+s SECTOR s [1:0] sampling phase, [12:8] alignment delay (s = 0..12)
//   0x000020 SNAPCTRL   [1:0] mode (1 record, 2 replay), [4] loop, [5] drive;
//                       writing [2] = 1 starts, [3] = 1 stops (pulses)
//   0x000021 SNAPLEN    [17:0] crossings to record/replay
//   0x000022 SNAPRBA    [18:0] memory word to read back; a write starts the read
//   0x000023 SNAPSTAT r [0] running, [1] done, [2] readback done, [24:8] crossing
//   0x000028+i SNAPRBD r 32-bit slice i (0..4) of the 144-bit readback word
//   0x000030 MONHI   r  [3:0] monitoring word bits 35:32, [31] FIFO empty
//   0x000031 MONLO   r  monitoring word bits 31:0; reading pops the word
//   0x400000+a LUT   w  table write, a = 22-bit table address (see
//                       overlap_handling), data in [5:0]
//
// The document says the look-up tables are loaded and the monitoring FIFO and
// snapshot memory are read through the VMEbus; the address map and the local
// bus protocol are this design's choices.
module reg_bank
  import mioct_pkg::*;
#(
  parameter int ALIGN_DEPTH = 16,
  parameter int PAW         = 8,
  parameter int BC_AW       = 17,
  localparam int DLY_W = $clog2(ALIGN_DEPTH + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // local bus
  input  logic [23:0]                  lb_addr,
  input  logic [31:0]                  lb_wdata,
  input  logic                         lb_we,
  input  logic                         lb_re,
  output logic [31:0]                  lb_rdata,
  output logic                         lb_rack,
  // trigger path configuration
  output logic [N_SECTORS-1:0][1:0]    phase_sel,
  output logic [N_SECTORS-1:0][DLY_W-1:0] delay,
  output logic                         check_en,
  output logic [BCID_W-1:0]            bcid_offset,
  input  logic [N_SECTORS-1:0]         bcid_err,
  input  logic                         bcid_err_valid,
  output logic                         cfg_we,
  output logic [21:0]                  cfg_addr,
  output logic [N_THR-1:0]             cfg_wdata,
  // readout configuration and status
  output logic [PAW-1:0]               l1_latency,
  output logic [1:0]                   win_pre,
  output logic [1:0]                   win_post,
  input  logic                         busy,
  input  logic [23:0]                  l1id,
  input  logic [RO_W-1:0]              mon_dout,
  input  logic                         mon_empty,
  output logic                         mon_pop,
  // snapshot memory
  output logic [1:0]                   snap_mode,
  output logic                         snap_start,
  output logic                         snap_stop,
  output logic                         snap_loop,
  output logic                         snap_drive,
  output logic [BC_AW:0]               snap_length,
  output logic [BC_AW+1:0]             snap_rb_addr,
  output logic                         snap_rb_req,
  input  logic                         snap_running,
  input  logic                         snap_done,
  input  logic [BC_AW-1:0]             snap_bc_addr,
  input  logic [143:0]                 snap_rb_data,
  input  logic                         snap_rb_done
);

  logic [N_SECTORS-1:0] err_sticky;
  logic                 rb_ready;
  logic                 is_lut;

  assign is_lut    = lb_addr[22];
  assign cfg_we    = lb_we && is_lut;
  assign cfg_addr  = lb_addr[21:0];
  assign cfg_wdata = lb_wdata[N_THR-1:0];
  assign mon_pop   = lb_re && !is_lut && lb_addr[21:0] == 22'h31;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_sel    <= '0;
      delay        <= '0;
      check_en     <= 1'b0;
      bcid_offset  <= '0;
      l1_latency   <= '0;
      win_pre      <= '0;
      win_post     <= '0;
      err_sticky   <= '0;
      snap_mode    <= '0;
      snap_start   <= 1'b0;
      snap_stop    <= 1'b0;
      snap_loop    <= 1'b0;
      snap_drive   <= 1'b0;
      snap_length  <= '0;
      snap_rb_addr <= '0;
      snap_rb_req  <= 1'b0;
      rb_ready     <= 1'b0;
    end else begin
      snap_start  <= 1'b0;
      snap_stop   <= 1'b0;
      snap_rb_req <= 1'b0;
      if (bcid_err_valid) err_sticky <= err_sticky | bcid_err;
      if (snap_rb_done) rb_ready <= 1'b1;
      if (lb_we && !is_lut) begin
        case (lb_addr[21:0])
          22'h00: begin
            check_en    <= lb_wdata[0];
            bcid_offset <= lb_wdata[3:1];
            win_pre     <= (lb_wdata[5:4] > 2'd2) ? 2'd2 : lb_wdata[5:4];
            win_post    <= (lb_wdata[7:6] > 2'd2) ? 2'd2 : lb_wdata[7:6];
          end
          22'h01: l1_latency <= lb_wdata[PAW-1:0];
          22'h03: err_sticky <= err_sticky & ~lb_wdata[N_SECTORS-1:0];
          22'h20: begin
            snap_mode  <= lb_wdata[1:0];
            snap_start <= lb_wdata[2];
            snap_stop  <= lb_wdata[3];
            snap_loop  <= lb_wdata[4];
            snap_drive <= lb_wdata[5];
          end
          22'h21: snap_length <= lb_wdata[BC_AW:0];
          22'h22: begin
            snap_rb_addr <= lb_wdata[BC_AW+1:0];
            snap_rb_req  <= 1'b1;
            rb_ready     <= 1'b0;
          end
          default: begin
            if (lb_addr[21:4] == 18'h1 && int'(lb_addr[3:0]) < N_SECTORS) begin
              phase_sel[lb_addr[3:0]] <= lb_wdata[1:0];
              delay[lb_addr[3:0]]     <= lb_wdata[8 +: DLY_W];
            end
          end
        endcase
      end
    end
  end

  // Read data, one clock after the strobe.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_rdata <= '0;
      lb_rack  <= 1'b0;
    end else begin
      lb_rack <= lb_re;
      if (lb_re) begin
        lb_rdata <= '0;
        case (lb_addr[21:0])
          22'h00: lb_rdata <= {24'b0, win_post, win_pre, bcid_offset, check_en};
          22'h01: lb_rdata <= 32'(l1_latency);
          22'h02: lb_rdata <= {29'b0, snap_done, snap_running, busy};
          22'h03: lb_rdata <= 32'(err_sticky);
          22'h04: lb_rdata <= {8'b0, l1id};
          22'h20: lb_rdata <= {26'b0, snap_drive, snap_loop, 2'b0, snap_mode};
          22'h21: lb_rdata <= 32'(snap_length);
          22'h22: lb_rdata <= 32'(snap_rb_addr);
          22'h23: lb_rdata <= 32'({snap_bc_addr, 5'b0, rb_ready, snap_done, snap_running});
          22'h28: lb_rdata <= snap_rb_data[31:0];
          22'h29: lb_rdata <= snap_rb_data[63:32];
          22'h2A: lb_rdata <= snap_rb_data[95:64];
          22'h2B: lb_rdata <= snap_rb_data[127:96];
          22'h2C: lb_rdata <= 32'(snap_rb_data[143:128]);
          22'h30: lb_rdata <= {mon_empty, 27'b0, mon_dout[35:32]};
          22'h31: lb_rdata <= mon_dout[31:0];
          default:
            if (lb_addr[21:4] == 18'h1 && int'(lb_addr[3:0]) < N_SECTORS)
              lb_rdata <= 32'({delay[lb_addr[3:0]], 6'b0, phase_sel[lb_addr[3:0]]});
        endcase
      end
    end
  end

endmodule
