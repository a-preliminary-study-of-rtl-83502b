// verlet_cell: one cell of the Verlet fabric, the loop body for M atoms.
//
// A cell holds six local memories of M_DEPTH 32-bit words: f, M, vel and pos
// are the inputs, vel_out and pos_out receive the results, and the pipelined
// datapath sits between them. The six-memory split (inputs and results in
// separate memories) follows the original study's pipelined data-path and its count
// of thirty memories for five cells.
//
// Host side: one word access per cycle to the memory named by h_memsel;
// h_rdata is valid the cycle after h_rd. MS_DT is not a cell memory and is
// ignored here (the fabric holds dt).
// Sequencer side: while seq_valid is high the four inputs are read at
// seq_addr; the result for that atom is written to vel_out/pos_out at the
// same address, and is readable CELL_LAT (= 22) cycles after seq_addr was
// presented: one cycle of memory read, 20 of datapath, one of write.
module verlet_cell
  import md_pkg::*;
#(
  parameter int unsigned M_DEPTH = 128,
  localparam int unsigned AW     = $clog2(M_DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host / DMA access
  input  memsel_e         h_memsel,
  input  logic [AW-1:0]   h_addr,
  input  logic [FP_W-1:0] h_wdata,
  input  logic            h_wr,
  input  logic            h_rd,
  output logic [FP_W-1:0] h_rdata,
  // shared sequencer
  input  logic            seq_valid,
  input  logic [AW-1:0]   seq_addr,
  input  logic [FP_W-1:0] dt
);

  localparam int unsigned NMEM = 6;   // MS_F .. MS_POS_OUT

  logic [FP_W-1:0] a_rdata [NMEM];
  logic [FP_W-1:0] b_rdata [NMEM];
  logic [NMEM-1:0] b_wr;
  logic [AW-1:0]   b_addr  [NMEM];
  logic [FP_W-1:0] b_wdata [NMEM];

  // datapath
  logic            dp_in_valid, dp_out_valid;
  logic [AW-1:0]   dp_in_tag, dp_out_tag;
  logic [FP_W-1:0] vel_new, pos_new;

  for (genvar i = 0; i < int'(NMEM); i++) begin : g_mem
    cell_mem #(.DEPTH(M_DEPTH), .W(FP_W)) u_mem (
      .clk    (clk),
      .a_rd   (h_rd && (h_memsel == memsel_e'(i))),
      .a_wr   (h_wr && (h_memsel == memsel_e'(i))),
      .a_addr (h_addr),
      .a_wdata(h_wdata),
      .a_rdata(a_rdata[i]),
      .b_rd   (seq_valid),
      .b_wr   (b_wr[i]),
      .b_addr (b_addr[i]),
      .b_wdata(b_wdata[i]),
      .b_rdata(b_rdata[i])
    );
  end

  // port B: inputs are read at the sequencer address, results written at the tag
  always_comb begin
    for (int i = 0; i < int'(NMEM); i++) begin
      b_wr[i]    = 1'b0;
      b_addr[i]  = seq_addr;
      b_wdata[i] = '0;
    end
    b_wr[MS_VEL_OUT]    = dp_out_valid;
    b_addr[MS_VEL_OUT]  = dp_out_tag;
    b_wdata[MS_VEL_OUT] = vel_new;
    b_wr[MS_POS_OUT]    = dp_out_valid;
    b_addr[MS_POS_OUT]  = dp_out_tag;
    b_wdata[MS_POS_OUT] = pos_new;
  end

  // memory read takes one cycle: the valid bit and address follow it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_in_valid <= 1'b0;
      dp_in_tag   <= '0;
    end else begin
      dp_in_valid <= seq_valid;
      dp_in_tag   <= seq_addr;
    end
  end

  verlet_datapath #(.TAG_W(AW)) u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (dp_in_valid),
    .in_tag   (dp_in_tag),
    .f        (b_rdata[MS_F]),
    .m        (b_rdata[MS_M]),
    .vel      (b_rdata[MS_VEL]),
    .pos      (b_rdata[MS_POS]),
    .dt       (dt),
    .out_valid(dp_out_valid),
    .out_tag  (dp_out_tag),
    .vel_new  (vel_new),
    .pos_new  (pos_new)
  );

  // host read data: the memory selected when the read was issued
  memsel_e rd_sel;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    rd_sel <= MS_F;
    else if (h_rd) rd_sel <= h_memsel;
  end

  always_comb begin
    h_rdata = '0;
    if (int'(rd_sel) < int'(NMEM)) h_rdata = a_rdata[rd_sel];
  end

endmodule
