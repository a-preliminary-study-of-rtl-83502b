// fabric: the pipelined Verlet fabric, N_CELLS identical cells and one shared
// sequencer, seen from outside as a single memory.
//
// Memory side (the DMA): one access per cycle, described by a fab_req_t.
// cell_sel picks the cell (SelectCell), memsel the memory in it
// (AddressMemorySelect), addr the word (Address). wr writes wdata; rd returns
// the word on rdata one cycle later. memsel MS_DT reaches the single dt
// register shared by all cells, whatever cell_sel says. An access to a cell
// number the fabric does not have is ignored and reads as zero.
// Control side: Reset, Start, Stop, AddressStop and ProgramAddress go to the
// sequencer (see sequencer.sv). The cells run their atoms in lock step, so
// one Stop serves all of them. The memories are dual-ported, so the host side
// stays usable during a run; the caller must not change inputs that a run is
// still reading.
//
// Cells without communication channels, a single controller for all cells
// and the port names follow the original study; the request encoding and the
// shared dt register are this design's choices.
module fabric
  import md_pkg::*;
#(
  parameter int unsigned N_CELLS = 5,
  parameter int unsigned M_DEPTH = 128,
  localparam int unsigned AW     = $clog2(M_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  fab_req_t        req,
  output logic [FP_W-1:0] rdata,
  input  logic            f_reset,
  input  logic            start,
  output logic            stop,
  input  logic [AW-1:0]   addr_stop,
  input  logic [AW-1:0]   prog_addr,
  output logic            busy
);

  logic [FP_W-1:0] dt;
  logic            seq_valid;
  logic [AW-1:0]   seq_addr;
  logic [FP_W-1:0] cell_rdata [N_CELLS];

  initial assert (N_CELLS >= 1 && N_CELLS <= (1 << CELL_SEL_W));
  initial assert (AW <= ATOM_AW);

  sequencer #(.M_DEPTH(M_DEPTH)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .f_reset  (f_reset),
    .start    (start),
    .prog_addr(prog_addr),
    .addr_stop(addr_stop),
    .seq_valid(seq_valid),
    .seq_addr (seq_addr),
    .stop     (stop),
    .busy     (busy)
  );

  for (genvar c = 0; c < int'(N_CELLS); c++) begin : g_cell
    logic hit;
    assign hit = (req.cell_sel == CELL_SEL_W'(c)) && (req.memsel != MS_DT);
    verlet_cell #(.M_DEPTH(M_DEPTH)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .h_memsel (req.memsel),
      .h_addr   (req.addr[AW-1:0]),
      .h_wdata  (req.wdata),
      .h_wr     (req.wr && hit),
      .h_rd     (req.rd && hit),
      .h_rdata  (cell_rdata[c]),
      .seq_valid(seq_valid),
      .seq_addr (seq_addr),
      .dt       (dt)
    );
  end

  // dt register, shared by all cells
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          dt <= '0;
    else if (req.wr && req.memsel == MS_DT) dt <= req.wdata;
  end

  // read-data steering, one cycle after rd
  logic                  rd_dt, rd_ok;
  logic [CELL_SEL_W-1:0] rd_cell;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_dt   <= 1'b0;
      rd_ok   <= 1'b0;
      rd_cell <= '0;
    end else if (req.rd) begin
      rd_dt   <= (req.memsel == MS_DT);
      rd_ok   <= (int'(req.cell_sel) < int'(N_CELLS)) && (req.memsel <= MS_POS_OUT);
      rd_cell <= req.cell_sel;
    end
  end

  always_comb begin
    rdata = '0;
    if (rd_dt) rdata = dt;
    else if (rd_ok) begin
      for (int c = 0; c < int'(N_CELLS); c++)
        if (rd_cell == CELL_SEL_W'(c)) rdata = cell_rdata[c];
    end
  end

endmodule
