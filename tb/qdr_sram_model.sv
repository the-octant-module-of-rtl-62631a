// qdr_sram_model: behavioural model of the snapshot memory as seen through
// the user port of its memory-interface core (two 1M x 36 QDR-II SRAM chips,
// burst of two, so 2**AW words of 144 bits). Writes take effect at the clock
// edge; a read returns its word RD_LAT clocks later with rvalid. Not
// synthesizable logic of the design: it stands for external chips and a
// vendor core, and exists only for simulation.
module qdr_sram_model #(
  parameter int AW     = 19,
  parameter int DW     = 144,
  parameter int RD_LAT = 3
) (
  input  logic          clk,
  input  logic          wr,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rd,
  input  logic [AW-1:0] raddr,
  output logic          rvalid,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];
  logic          v [RD_LAT];
  logic [DW-1:0] d [RD_LAT];

  initial for (int i = 0; i < RD_LAT; i++) v[i] = 1'b0;

  always_ff @(posedge clk) begin
    if (wr) mem[waddr] <= wdata;
    v[0] <= rd;
    d[0] <= mem[raddr];
    for (int i = 1; i < RD_LAT; i++) begin
      v[i] <= v[i-1];
      d[i] <= d[i-1];
    end
  end

  assign rvalid = v[RD_LAT-1];
  assign rdata  = d[RD_LAT-1];
endmodule
