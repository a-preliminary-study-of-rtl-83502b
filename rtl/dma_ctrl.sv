// dma_ctrl: the DMA and controller between the stripe's dual-port RAM and the
// fabric.
//
// The ARM writes a small register file through the AHB slave controller,
// then issues commands in R_CTRL:
//   LOAD   copy R_COUNT 32-bit words from the dual-port RAM, starting at
//          16-bit address R_DP_ADDR, into memory R_MEMSEL of cell R_CELL,
//          starting at word R_FADDR (MS_DT loads the shared dt register)
//   STORE  the same transfer in the other direction
//   START  pulse the fabric's Start (run atoms R_PROG_ADDR..R_ADDR_STOP)
//   FRESET pulse the fabric's Reset
// The RAM is 16 bits wide, so each fabric word is two RAM words, low half at
// the lower address. A LOAD word takes three cycles (read low, read high,
// write fabric), a STORE word three (read fabric, write low, write high).
// A LOAD or STORE written while a transfer is running is ignored; START and
// FRESET act at once. R_STATUS: bit 0 transfer busy, bit 1 fabric Stop,
// bit 2 fabric running.
// The register port is read combinationally (reg_rdata follows reg_addr).
// The RAM reads synchronously: dp_rdata is valid the cycle after dp_rd.
//
// The original study gives this block's name, its place between the RAM and the
// fabric, and the signal names on the fabric side; the register map,
// commands, half-word order and transfer timing are this design's choices.
module dma_ctrl
  import md_pkg::*;
#(
  parameter int unsigned M_DEPTH = 128,
  localparam int unsigned AW     = $clog2(M_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // register port from the slave controller
  input  reg_e             reg_addr,
  input  logic [31:0]      reg_wdata,
  input  logic             reg_wr,
  output logic [31:0]      reg_rdata,
  // dual-port RAM, user-logic side
  output logic [DP_AW-1:0] dp_addr,
  output logic             dp_wr,
  output logic             dp_rd,
  output logic [DP_DW-1:0] dp_wdata,
  input  logic [DP_DW-1:0] dp_rdata,
  // fabric
  output fab_req_t         fab_req,
  input  logic [FP_W-1:0]  fab_rdata,
  output logic             f_reset,
  output logic             f_start,
  input  logic             f_stop,
  input  logic             f_busy,
  output logic [AW-1:0]    f_addr_stop,
  output logic [AW-1:0]    f_prog_addr
);

  typedef enum logic [2:0] {
    D_IDLE,
    D_L_LO,   // load: read low half
    D_L_HI,   // load: read high half, capture low
    D_L_WR,   // load: capture high, write fabric
    D_S_RD,   // store: read fabric
    D_S_LO,   // store: write low half
    D_S_HI    // store: write high half
  } dstate_e;

  dstate_e               state;
  logic [DP_AW-1:0]      r_dp_addr, cur_dp;
  logic [CELL_SEL_W-1:0] r_cell;
  memsel_e               r_memsel;
  logic [AW-1:0]         r_faddr, cur_fa;
  logic [AW:0]           r_count, left;
  logic [AW-1:0]         r_addr_stop, r_prog_addr;
  logic [DP_DW-1:0]      lo_half, hi_half;

  logic ctrl_wr;
  assign ctrl_wr = reg_wr && (reg_addr == R_CTRL);

  // register file
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_dp_addr   <= '0;
      r_cell      <= '0;
      r_memsel    <= MS_F;
      r_faddr     <= '0;
      r_count     <= '0;
      r_addr_stop <= AW'(M_DEPTH - 1);
      r_prog_addr <= '0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        R_DP_ADDR:   r_dp_addr   <= reg_wdata[DP_AW-1:0];
        R_CELL:      r_cell      <= reg_wdata[CELL_SEL_W-1:0];
        R_MEMSEL:    r_memsel    <= memsel_e'(reg_wdata[2:0]);
        R_FADDR:     r_faddr     <= reg_wdata[AW-1:0];
        R_COUNT:     r_count     <= reg_wdata[AW:0];
        R_ADDR_STOP: r_addr_stop <= reg_wdata[AW-1:0];
        R_PROG_ADDR: r_prog_addr <= reg_wdata[AW-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      R_STATUS:    reg_rdata = {29'd0, f_busy, f_stop, state != D_IDLE};
      R_DP_ADDR:   reg_rdata = 32'(r_dp_addr);
      R_CELL:      reg_rdata = 32'(r_cell);
      R_MEMSEL:    reg_rdata = 32'(r_memsel);
      R_FADDR:     reg_rdata = 32'(r_faddr);
      R_COUNT:     reg_rdata = 32'(r_count);
      R_ADDR_STOP: reg_rdata = 32'(r_addr_stop);
      R_PROG_ADDR: reg_rdata = 32'(r_prog_addr);
      default:     reg_rdata = '0;
    endcase
  end

  // fabric control pulses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_start <= 1'b0;
      f_reset <= 1'b0;
    end else begin
      f_start <= ctrl_wr && reg_wdata[CTRL_START];
      f_reset <= ctrl_wr && reg_wdata[CTRL_FRESET];
    end
  end
  assign f_addr_stop = r_addr_stop;
  assign f_prog_addr = r_prog_addr;

  // transfer engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= D_IDLE;
      cur_dp  <= '0;
      cur_fa  <= '0;
      left    <= '0;
      lo_half <= '0;
      hi_half <= '0;
    end else begin
      unique case (state)
        D_IDLE:
          if (ctrl_wr && (reg_wdata[CTRL_LOAD] || reg_wdata[CTRL_STORE]) && r_count != 0) begin
            cur_dp <= r_dp_addr;
            cur_fa <= r_faddr;
            left   <= r_count;
            state  <= reg_wdata[CTRL_LOAD] ? D_L_LO : D_S_RD;
          end
        D_L_LO: state <= D_L_HI;
        D_L_HI: begin
          lo_half <= dp_rdata;
          state   <= D_L_WR;
        end
        D_L_WR: begin
          cur_dp <= cur_dp + DP_AW'(2);
          cur_fa <= cur_fa + 1'b1;
          left   <= left - 1'b1;
          state  <= (left == 1) ? D_IDLE : D_L_LO;
        end
        D_S_RD: state <= D_S_LO;
        D_S_LO: begin
          hi_half <= fab_rdata[31:16];
          state   <= D_S_HI;
        end
        D_S_HI: begin
          cur_dp <= cur_dp + DP_AW'(2);
          cur_fa <= cur_fa + 1'b1;
          left   <= left - 1'b1;
          state  <= (left == 1) ? D_IDLE : D_S_RD;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // RAM and fabric strobes, decoded from the state
  always_comb begin
    dp_addr  = cur_dp;
    dp_rd    = 1'b0;
    dp_wr    = 1'b0;
    dp_wdata = '0;
    fab_req          = '0;
    fab_req.cell_sel = r_cell;
    fab_req.memsel   = r_memsel;
    fab_req.addr     = ATOM_AW'(cur_fa);
    fab_req.wdata    = {dp_rdata, lo_half};
    unique case (state)
      D_L_LO: dp_rd = 1'b1;
      D_L_HI: begin
        dp_rd   = 1'b1;
        dp_addr = cur_dp + 1'b1;
      end
      D_L_WR: fab_req.wr = 1'b1;
      D_S_RD: fab_req.rd = 1'b1;
      D_S_LO: begin
        dp_wr    = 1'b1;
        dp_wdata = fab_rdata[15:0];
      end
      D_S_HI: begin
        dp_wr    = 1'b1;
        dp_addr  = cur_dp + 1'b1;
        dp_wdata = hi_half;
      end
      default: ;
    endcase
  end

  // never read and write the RAM in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(dp_rd && dp_wr));

endmodule
