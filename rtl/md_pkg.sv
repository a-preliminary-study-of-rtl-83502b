// md_pkg: types and constants shared by the Verlet position-update accelerator.
//
// The accelerator runs the tiled Verlet update on N identical cells:
//   vel'[k] = vel[k] + f[k]*M[k]        (M[k] = 0.5*dt*imass[k], precomputed by the host)
//   pos'[k] = pos[k] + dt*vel'[k]
// in IEEE-754 single precision. Each cell owns six 128x32 local memories.
// The latencies below are chosen so that an atom's result is readable
// 22 cycles after its address is issued, with one new atom per cycle.
// The split of those 22 cycles into memory and floating-point stages,
// the memory-select encoding and the field widths are this design's choices.
package md_pkg;

  localparam int unsigned FP_W       = 32;  // IEEE-754 single precision
  localparam int unsigned MUL_LAT    = 5;   // pipeline stages of fp_mul
  localparam int unsigned ADD_LAT    = 5;   // pipeline stages of fp_add
  // datapath latency: mul, add, mul, add on the critical path
  localparam int unsigned DP_LAT     = 2 * MUL_LAT + 2 * ADD_LAT;
  // address issue -> result readable: read (1) + datapath + write (1)
  localparam int unsigned CELL_LAT   = DP_LAT + 2;

  localparam int unsigned CELL_SEL_W = 5;   // SelectCell: up to 32 cells
  localparam int unsigned ATOM_AW    = 7;   // 128 words per local memory
  localparam int unsigned DP_AW      = 15;  // 32K x 16b dual-port RAM
  localparam int unsigned DP_DW      = 16;

  // AddressMemorySelect encoding
  typedef enum logic [2:0] {
    MS_F       = 3'd0,  // force f[]
    MS_M       = 3'd1,  // M[] = 0.5*dt*imass[]
    MS_VEL     = 3'd2,  // vel[] input
    MS_POS     = 3'd3,  // pos[] input
    MS_VEL_OUT = 3'd4,  // vel[] result
    MS_POS_OUT = 3'd5,  // pos[] result
    MS_DT      = 3'd6   // dt register, common to all cells
  } memsel_e;

  // One access of the fabric's memory port (DMA side)
  typedef struct packed {
    logic [CELL_SEL_W-1:0] cell_sel;    // SelectCell
    memsel_e               memsel;  // AddressMemorySelect
    logic [ATOM_AW-1:0]    addr;    // Address
    logic [FP_W-1:0]       wdata;   // Data bus, write direction
    logic                  wr;      // WR_Data
    logic                  rd;      // RD_Data
  } fab_req_t;

  // DMA controller register indices (word offsets on the AHB slave)
  typedef enum logic [3:0] {
    R_CTRL      = 4'd0,
    R_STATUS    = 4'd1,
    R_DP_ADDR   = 4'd2,
    R_CELL      = 4'd3,
    R_MEMSEL    = 4'd4,
    R_FADDR     = 4'd5,
    R_COUNT     = 4'd6,
    R_ADDR_STOP = 4'd7,
    R_PROG_ADDR = 4'd8
  } reg_e;

  // R_CTRL command bits (write 1 to act)
  localparam int unsigned CTRL_LOAD   = 0;  // dual-port RAM -> fabric
  localparam int unsigned CTRL_STORE  = 1;  // fabric -> dual-port RAM
  localparam int unsigned CTRL_START  = 2;  // start the fabric
  localparam int unsigned CTRL_FRESET = 3;  // reset the fabric sequencer

endpackage
