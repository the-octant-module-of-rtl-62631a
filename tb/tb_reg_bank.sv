// tb_reg_bank: self-checking test of the local-bus register bank. Random
// writes to the control, latency, sector and snapshot registers are mirrored
// in a model and read back (read data one clock after the strobe, with
// lb_rack); the window fields must clip at 2; table writes must appear on the
// configuration port with the 22-bit address and 6-bit data and nowhere else;
// start/stop and the readback request must be one-clock pulses; alignment
// errors must be sticky and clear by writing ones; reading MONLO must pop the
// monitoring FIFO exactly once; status inputs must appear in their fields.
module tb_reg_bank;
  import mioct_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [23:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic lb_we = 0, lb_re = 0, lb_rack;
  logic [N_SECTORS-1:0][1:0] phase_sel;
  logic [N_SECTORS-1:0][4:0] delay;
  logic check_en;
  logic [2:0] bcid_offset;
  logic [N_SECTORS-1:0] bcid_err = '0;
  logic bcid_err_valid = 0;
  logic cfg_we;
  logic [21:0] cfg_addr;
  logic [N_THR-1:0] cfg_wdata;
  logic [7:0] l1_latency;
  logic [1:0] win_pre, win_post;
  logic busy = 0;
  logic [23:0] l1id = 24'h123456;
  logic [RO_W-1:0] mon_dout = 36'h9_8765_4321;
  logic mon_empty = 0, mon_pop;
  logic [1:0] snap_mode;
  logic snap_start, snap_stop, snap_loop, snap_drive;
  logic [17:0] snap_length;
  logic [18:0] snap_rb_addr;
  logic snap_rb_req;
  logic snap_running = 0, snap_done = 0;
  logic [16:0] snap_bc_addr = 17'h1abcd;
  logic [143:0] snap_rb_data = {16'hbeef, 32'h44444444, 32'h33333333, 32'h22222222, 32'h11111111};
  logic snap_rb_done = 0;
  int checks = 0, failures = 0;
  int n_cfg = 0, n_pop = 0, n_start = 0, n_rbreq = 0;

  reg_bank #(.ALIGN_DEPTH(16), .PAW(8), .BC_AW(17)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && cfg_we) n_cfg++;
    if (rst_n && mon_pop) n_pop++;
    if (rst_n && snap_start) n_start++;
    if (rst_n && snap_rb_req) n_rbreq++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic wr(logic [23:0] a, logic [31:0] d);
    @(negedge clk);
    lb_addr = a; lb_wdata = d; lb_we = 1;
    @(negedge clk);
    lb_we = 0;
  endtask

  task automatic rd(logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    lb_addr = a; lb_re = 1;
    @(negedge clk);
    lb_re = 0;
    check(lb_rack, "lb_rack one clock after lb_re");
    d = lb_rdata;
    @(negedge clk);
    check(!lb_rack, "lb_rack is one clock long");
  endtask

  logic [31:0] d;
  logic [1:0] m_phase [N_SECTORS];
  logic [4:0] m_delay [N_SECTORS];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // control register, with window clipping
    for (int i = 0; i < 40; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      wr(24'h0, 32'(v));
      rd(24'h0, d);
      check(d[0] == v[0] && d[3:1] == v[3:1], "CTRL check/offset");
      check(d[5:4] == ((v[5:4] > 2) ? 2'd2 : v[5:4]) && d[7:6] == ((v[7:6] > 2) ? 2'd2 : v[7:6]), "CTRL window clipped");
      check(check_en == v[0] && bcid_offset == v[3:1] && win_pre == d[5:4] && win_post == d[7:6], "CTRL outputs");
    end
    // latency
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      wr(24'h1, 32'(v));
      rd(24'h1, d);
      check(d == 32'(v) && l1_latency == v, "L1LAT");
    end
    // sector registers
    for (int s = 0; s < N_SECTORS; s++) begin
      m_phase[s] = 2'($urandom);
      m_delay[s] = 5'($urandom % 17);
      wr(24'h10 + 24'(s), {19'b0, m_delay[s], 6'b0, m_phase[s]});
    end
    for (int s = 0; s < N_SECTORS; s++) begin
      rd(24'h10 + 24'(s), d);
      check(d[1:0] == m_phase[s] && d[12:8] == m_delay[s], $sformatf("SECTOR %0d readback", s));
      check(phase_sel[s] == m_phase[s] && delay[s] == m_delay[s], $sformatf("SECTOR %0d outputs", s));
    end
    // table writes go to the configuration port only
    for (int i = 0; i < 50; i++) begin
      logic [21:0] a;
      logic [5:0] v;
      a = 22'($urandom);
      v = 6'($urandom);
      @(negedge clk);
      lb_addr = {2'b01, a}; lb_wdata = {$urandom, v}; lb_we = 1;
      #1;
      check(cfg_we && cfg_addr == a && cfg_wdata == v, "table write on the configuration port");
      @(negedge clk);
      lb_we = 0;
      #1;
      check(!cfg_we, "table write strobe one clock");
    end
    rd(24'h1, d);
    check(d[7:0] == l1_latency, "table writes leave the registers alone");
    // status fields
    busy = 1; snap_running = 1; snap_done = 0;
    rd(24'h2, d);
    check(d[2:0] == 3'b011, "STATUS");
    rd(24'h4, d);
    check(d == 32'h00123456, "L1ID");
    // sticky errors, write one to clear
    @(negedge clk);
    bcid_err = 13'h0a5; bcid_err_valid = 1;
    @(negedge clk);
    bcid_err = 13'h100;
    @(negedge clk);
    bcid_err_valid = 0; bcid_err = 13'h1fff;
    rd(24'h3, d);
    check(d == 32'h1a5, "BCIDERR sticky");
    wr(24'h3, 32'h005);
    rd(24'h3, d);
    check(d == 32'h1a0, "BCIDERR write-1-to-clear");
    // snapshot control pulses
    wr(24'h20, 32'h35);   // mode 1, start, loop, drive
    check(snap_mode == 2'd1 && snap_loop && snap_drive, "SNAPCTRL fields");
    rd(24'h20, d);
    check(d[1:0] == 2'd1 && d[4] && d[5] && d[3:2] == 2'b00, "SNAPCTRL readback");
    wr(24'h21, 32'h2_0000);
    check(snap_length == 18'h2_0000, "SNAPLEN");
    wr(24'h22, 32'h5_4321);
    check(snap_rb_addr == 19'h5_4321, "SNAPRBA");
    snap_done = 1;
    rd(24'h23, d);
    check(d == {7'b0, 17'h1abcd, 5'b0, 3'b011}, "SNAPSTAT before readback done");
    @(negedge clk);
    snap_rb_done = 1;
    @(negedge clk);
    snap_rb_done = 0;
    rd(24'h23, d);
    check(d[2], "SNAPSTAT readback ready");
    for (int i = 0; i < 5; i++) begin
      rd(24'h28 + 24'(i), d);
      check(d == 32'(snap_rb_data[32*i +: 32]), $sformatf("SNAPRBD %0d", i));
    end
    // monitoring FIFO
    rd(24'h30, d);
    check(d == 32'h0000_0009, "MONHI");
    check(n_pop == 0, "MONHI does not pop");
    rd(24'h31, d);
    check(d == 32'h8765_4321, "MONLO");
    check(n_pop == 1, "MONLO pops once");
    mon_empty = 1;
    rd(24'h30, d);
    check(d[31], "MONHI empty flag");
    check(n_cfg == 50, $sformatf("table writes %0d expected 50", n_cfg));
    check(n_start == 1 && n_rbreq == 1, "start and readback request are single pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
