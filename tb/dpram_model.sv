// dpram_model: behavioural model of the user-logic port of the SoPC's
// 32K x 16 dual-port RAM, for testbenches only (the real part is a hard block
// of the processor stripe). Synchronous read: rdata holds the word addressed
// in the last cycle with rd high. The processor's side is not modelled;
// testbenches fill and inspect mem directly, as the processor would over its
// own bus.
module dpram_model #(
  parameter int unsigned AW = 15,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          wr,
  input  logic          rd,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [1 << AW];

  initial rdata = '0;

  always @(posedge clk) begin
    if (wr) mem[addr] <= wdata;
    if (rd) rdata <= mem[addr];
  end
endmodule
