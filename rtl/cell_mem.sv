// cell_mem: one local memory of a Verlet cell, DEPTH words of W bits with two
// independent synchronous ports.
//
// Port A belongs to the host side (the DMA loads and examines the memory),
// port B to the cell's datapath (the sequencer reads inputs, the pipeline
// writes results). Both ports read synchronously: rdata holds the word at
// the address presented on the previous clock edge with rd high, and keeps it
// until the next read. A write takes effect at the clock edge. If both ports
// write the same word in one cycle, port B wins. The default 128x32 matches
// the memory blocks the accelerator is built from; the port behaviour is this
// design's choice.
module cell_mem #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: host / DMA
  input  logic          a_rd,
  input  logic          a_wr,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B: datapath
  input  logic          b_rd,
  input  logic          b_wr,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_wr) mem[a_addr] <= a_wdata;
    if (b_wr) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_rd) a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_rd) b_rdata <= mem[b_addr];
  end

endmodule
