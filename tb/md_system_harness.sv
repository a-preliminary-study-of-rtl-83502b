// md_system_harness: one complete accelerator system for workload tests, with
// the number of cells as a parameter: md_top, the dual-port RAM model and an
// AHB bus model, plus a processor-side program. The program fills the RAM
// with 128 atoms per cell, has the DMA load every array and dt into every
// cell, runs all atoms, stores vel_out and pos_out back and checks every word
// against the reference Verlet update. It also checks that the run takes
// 128 + 22 cycles from Start to Stop whatever the number of cells. done rises
// when the program has finished; checks and failures are its tallies.
module md_system_harness
  import md_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int unsigned N_CELLS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   run_cycles
);
  localparam int N    = N_CELLS;
  localparam int M    = 128;
  localparam int AREA = 2 * M;
  localparam int DT_ADDR  = 4 * N * AREA;
  localparam int OUT_BASE = DT_ADDR + 64;

  initial assert (OUT_BASE + 2 * N * AREA <= (1 << DP_AW));   // data set fits the RAM

  logic             hsel, hwrite, hready, hreadyout;
  logic [31:0]      haddr, hwdata, hrdata;
  logic [1:0]       htrans, hresp;
  logic [2:0]       hsize;
  logic [DP_AW-1:0] dp_addr;
  logic             dp_wr, dp_rd;
  logic [DP_DW-1:0] dp_wdata, dp_rdata;
  int               cyc = 0, t_start = 0;
  logic             stop_q = 1'b0;
  logic [31:0]      img [N][4][M];

  md_top #(.N_CELLS(N_CELLS)) dut (.*);
  dpram_model u_ram (.clk(clk), .addr(dp_addr), .wr(dp_wr), .rd(dp_rd),
                     .wdata(dp_wdata), .rdata(dp_rdata));
  ahb_master_bfm bfm (.clk(clk), .hsel(hsel), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
                      .hsize(hsize), .hwdata(hwdata), .hready(hready), .hreadyout(hreadyout),
                      .hrdata(hrdata), .stall(1'b0));

  always @(posedge clk) begin
    cyc    <= cyc + 1;
    stop_q <= dut.f_stop;
    if (dut.f_start) t_start <= cyc;
    if (dut.f_stop && !stop_q) run_cycles <= cyc - t_start;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("N=%0d FAIL: %s", N, what);
    end
  endtask

  task automatic wreg(input reg_e r, input int v);
    bfm.write(32'(r) << 2, 32'(v));
  endtask

  task automatic wait_status(input int bitpos, input logic level);
    logic [31:0] st;
    do bfm.read(32'(R_STATUS) << 2, st); while (st[bitpos] != level);
  endtask

  task automatic dma(input bit load, input int dpa, input int c, input memsel_e s, input int n);
    wreg(R_DP_ADDR, dpa);
    wreg(R_CELL, c);
    wreg(R_MEMSEL, int'(s));
    wreg(R_FADDR, 0);
    wreg(R_COUNT, n);
    wreg(R_CTRL, load ? (1 << CTRL_LOAD) : (1 << CTRL_STORE));
    wait_status(0, 1'b0);
  endtask

  function automatic logic [31:0] ram_word(input int a);
    return {u_ram.mem[a + 1], u_ram.mem[a]};
  endfunction

  initial begin
    logic [31:0] dt;
    logic [63:0] r;
    done = 0; checks = 0; failures = 0; run_cycles = 0;
    @(posedge rst_n);
    for (int c = 0; c < N; c++)
      for (int a = 0; a < M; a++) begin
        img[c][MS_F][a]   = rand_f(110, 140);
        img[c][MS_M][a]   = rand_f(110, 130);
        img[c][MS_VEL][a] = rand_f(110, 135);
        img[c][MS_POS][a] = rand_f(120, 140);
        for (int s = 0; s < 4; s++) begin
          u_ram.mem[((c * 4) + s) * AREA + 2 * a]     = img[c][s][a][15:0];
          u_ram.mem[((c * 4) + s) * AREA + 2 * a + 1] = img[c][s][a][31:16];
        end
      end
    dt = rand_f(118, 124);
    u_ram.mem[DT_ADDR]     = dt[15:0];
    u_ram.mem[DT_ADDR + 1] = dt[31:16];
    for (int c = 0; c < N; c++)
      for (int s = 0; s < 4; s++) dma(1, ((c * 4) + s) * AREA, c, memsel_e'(s), M);
    dma(1, DT_ADDR, 0, MS_DT, 1);
    wreg(R_PROG_ADDR, 0);
    wreg(R_ADDR_STOP, M - 1);
    wreg(R_CTRL, 1 << CTRL_START);
    wait_status(1, 1'b1);
    check(run_cycles == M + int'(CELL_LAT), "run length independent of the cell count");
    for (int c = 0; c < N; c++) begin
      dma(0, OUT_BASE + (2 * c) * AREA,     c, MS_VEL_OUT, M);
      dma(0, OUT_BASE + (2 * c + 1) * AREA, c, MS_POS_OUT, M);
    end
    for (int c = 0; c < N; c++)
      for (int a = 0; a < M; a++) begin
        r = ref_verlet(img[c][MS_F][a], img[c][MS_M][a], img[c][MS_VEL][a], img[c][MS_POS][a], dt);
        check(ram_word(OUT_BASE + (2 * c) * AREA + 2 * a) == r[31:0], "vel in RAM");
        check(ram_word(OUT_BASE + (2 * c + 1) * AREA + 2 * a) == r[63:32], "pos in RAM");
      end
    done = 1;
  end
endmodule
