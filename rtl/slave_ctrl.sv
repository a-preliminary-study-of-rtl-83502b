// slave_ctrl: AHB slave controller of the user-logic accelerator.
//
// It sits on the AHB master port that the stripe-to-PLD bridge drives and
// turns each 32-bit AHB transfer into one register access of the DMA
// controller. The address phase (hsel, htrans NONSEQ/SEQ, hready high) is
// registered; in the data phase a write presents hwdata with reg_wr high, and
// a read returns reg_rdata on hrdata in the same cycle. The slave never
// inserts wait states and always answers OKAY. Register index = haddr[5:2].
// Only word transfers are supported; assertions flag other sizes and
// unaligned addresses.
//
// The original study names this block and its 32-bit data, WR and RD signals; the
// AHB-Lite protocol handling and the register addressing are this design's.
module slave_ctrl
  import md_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AHB slave
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic [1:0]  hresp,
  output logic [31:0] hrdata,
  // register port to the DMA controller
  output reg_e        reg_addr,
  output logic [31:0] reg_wdata,
  output logic        reg_wr,
  output logic        reg_rd,
  input  logic [31:0] reg_rdata
);

  logic active;
  assign active = hsel && htrans[1] && hready;

  logic dph_valid, dph_write;
  reg_e dph_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph_valid <= 1'b0;
      dph_write <= 1'b0;
      dph_addr  <= R_CTRL;
    end else if (hready) begin
      dph_valid <= active;
      dph_write <= hwrite;
      dph_addr  <= reg_e'(haddr[5:2]);
    end
  end

  assign reg_addr  = dph_addr;
  assign reg_wdata = hwdata;
  assign reg_wr    = dph_valid && dph_write;
  assign reg_rd    = dph_valid && !dph_write;
  assign hrdata    = reg_rd ? reg_rdata : '0;
  assign hreadyout = 1'b1;
  assign hresp     = 2'b00;

  assert property (@(posedge clk) disable iff (!rst_n) active |-> hsize == 3'b010)
    else $error("slave_ctrl: only 32-bit transfers are supported");
  assert property (@(posedge clk) disable iff (!rst_n) active |-> haddr[1:0] == 2'b00)
    else $error("slave_ctrl: unaligned address");

endmodule
