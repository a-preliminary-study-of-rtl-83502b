// md_top: user-logic accelerator for the Verlet position/velocity update.
//
// The ARM of the SoPC puts per-atom data (f, M = 0.5*dt/mass, vel, pos) into
// the stripe's 32K x 16 dual-port RAM, then programs the DMA controller over
// AHB to copy each array into the local memories of the fabric's cells, to
// set dt, and to start the fabric. All N_CELLS cells then update their atoms
// in lock step, one atom per cycle each, 22 cycles of latency, and the fabric
// raises Stop; the ARM sees it in the status register and has the DMA copy
// the vel_out and pos_out memories back into the RAM.
//
//   AHB (from the stripe-to-PLD bridge) -> slave_ctrl -> dma_ctrl -> fabric
//                                                          |
//                         dual-port RAM (outside) <--------+
//
// Ports: an AHB-Lite slave and the user-logic port of the dual-port RAM,
// both outside this design (the RAM reads synchronously, one cycle). One
// clock and one active-low asynchronous reset.
//
// The partitioning into slave controller, DMA and controller, and fabric,
// and the fabric's signals follow the original study's SoPC implementation; the
// register interface is this design's.
module md_top
  import md_pkg::*;
#(
  parameter int unsigned N_CELLS = 5,
  parameter int unsigned M_DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  // AHB slave
  input  logic             hsel,
  input  logic [31:0]      haddr,
  input  logic [1:0]       htrans,
  input  logic             hwrite,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic             hreadyout,
  output logic [1:0]       hresp,
  output logic [31:0]      hrdata,
  // dual-port RAM, user-logic side
  output logic [DP_AW-1:0] dp_addr,
  output logic             dp_wr,
  output logic             dp_rd,
  output logic [DP_DW-1:0] dp_wdata,
  input  logic [DP_DW-1:0] dp_rdata
);

  localparam int unsigned AW = $clog2(M_DEPTH);

  reg_e            reg_addr;
  logic [31:0]     reg_wdata, reg_rdata;
  logic            reg_wr, reg_rd;
  fab_req_t        fab_req;
  logic [FP_W-1:0] fab_rdata;
  logic            f_reset, f_start, f_stop, f_busy;
  logic [AW-1:0]   f_addr_stop, f_prog_addr;

  slave_ctrl u_slave (
    .clk      (clk),
    .rst_n    (rst_n),
    .hsel     (hsel),
    .haddr    (haddr),
    .htrans   (htrans),
    .hwrite   (hwrite),
    .hsize    (hsize),
    .hwdata   (hwdata),
    .hready   (hready),
    .hreadyout(hreadyout),
    .hresp    (hresp),
    .hrdata   (hrdata),
    .reg_addr (reg_addr),
    .reg_wdata(reg_wdata),
    .reg_wr   (reg_wr),
    .reg_rd   (reg_rd),
    .reg_rdata(reg_rdata)
  );

  dma_ctrl #(.M_DEPTH(M_DEPTH)) u_dma (
    .clk        (clk),
    .rst_n      (rst_n),
    .reg_addr   (reg_addr),
    .reg_wdata  (reg_wdata),
    .reg_wr     (reg_wr),
    .reg_rdata  (reg_rdata),
    .dp_addr    (dp_addr),
    .dp_wr      (dp_wr),
    .dp_rd      (dp_rd),
    .dp_wdata   (dp_wdata),
    .dp_rdata   (dp_rdata),
    .fab_req    (fab_req),
    .fab_rdata  (fab_rdata),
    .f_reset    (f_reset),
    .f_start    (f_start),
    .f_stop     (f_stop),
    .f_busy     (f_busy),
    .f_addr_stop(f_addr_stop),
    .f_prog_addr(f_prog_addr)
  );

  fabric #(.N_CELLS(N_CELLS), .M_DEPTH(M_DEPTH)) u_fabric (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (fab_req),
    .rdata    (fab_rdata),
    .f_reset  (f_reset),
    .start    (f_start),
    .stop     (f_stop),
    .addr_stop(f_addr_stop),
    .prog_addr(f_prog_addr),
    .busy     (f_busy)
  );

endmodule
