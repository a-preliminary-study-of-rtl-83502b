// md_top_tb: end-to-end test of the accelerator at its default size
// (5 cells x 128 atoms), driven the way the SoPC's processor drives it.
//
// Atom data for every cell is placed in the dual-port RAM model; over AHB the
// test then programs the DMA to load f, M, vel and pos into every cell and dt
// into the fabric, starts a full run, polls the status register for Stop, has
// the DMA store vel_out and pos_out back into the RAM, and compares every
// word with the reference Verlet update. A second run over a sub-range with
// a new dt, a DMA command written while a transfer is busy, a fabric Reset
// that aborts a run, and foreign AHB wait states are exercised too. Each of
// these mechanisms is counted; one that never happened is a failure. The run
// must take one cycle per atom plus 22 cycles of latency.
module md_top_tb;
  import md_pkg::*;
  import fp_ref_pkg::*;

  localparam int N   = 5;      // md_top defaults
  localparam int M   = 128;
  localparam int AREA = 2 * M; // 16-bit RAM words per array
  localparam int DT_ADDR  = 4 * N * AREA;
  localparam int OUT_BASE = DT_ADDR + 64;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             hsel, hwrite, hready, hreadyout, stall;
  logic [31:0]      haddr, hwdata, hrdata;
  logic [1:0]       htrans, hresp;
  logic [2:0]       hsize;
  logic [DP_AW-1:0] dp_addr;
  logic             dp_wr, dp_rd;
  logic [DP_DW-1:0] dp_wdata, dp_rdata;

  int checks = 0, failures = 0, cyc = 0;
  int n_load = 0, n_store = 0, n_dt = 0, n_run = 0, n_subrun = 0, n_ignored = 0;
  int n_abort = 0, n_stall = 0;
  int t_start = 0, run_cycles = 0;

  logic [31:0] img [N][4][M];

  md_top dut (.*);
  dpram_model u_ram (.clk(clk), .addr(dp_addr), .wr(dp_wr), .rd(dp_rd),
                     .wdata(dp_wdata), .rdata(dp_rdata));
  ahb_master_bfm bfm (.clk(clk), .hsel(hsel), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
                      .hsize(hsize), .hwdata(hwdata), .hready(hready), .hreadyout(hreadyout),
                      .hrdata(hrdata), .stall(stall));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // run length: from the fabric's Start pulse to its Stop
  logic stop_q = 1'b0;
  always @(posedge clk) begin
    stop_q <= dut.f_stop;
    if (dut.f_start) t_start <= cyc;
    if (dut.f_stop && !stop_q) run_cycles <= cyc - t_start;
    if (!hready) n_stall++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stall = 0;
    forever begin
      @(negedge clk);
      stall = ($urandom % 6) == 0;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic wreg(input reg_e r, input int v);
    bfm.write(32'(r) << 2, 32'(v));
  endtask

  task automatic rreg(input reg_e r, output logic [31:0] v);
    bfm.read(32'(r) << 2, v);
  endtask

  task automatic wait_status(input int bitpos, input logic level);
    logic [31:0] st;
    do rreg(R_STATUS, st); while (st[bitpos] != level);
  endtask

  task automatic dma(input bit load, input int dpa, input int c, input memsel_e s,
                     input int fa, input int n);
    wreg(R_DP_ADDR, dpa);
    wreg(R_CELL, c);
    wreg(R_MEMSEL, int'(s));
    wreg(R_FADDR, fa);
    wreg(R_COUNT, n);
    wreg(R_CTRL, load ? (1 << CTRL_LOAD) : (1 << CTRL_STORE));
    wait_status(0, 1'b0);
    if (load) n_load++; else n_store++;
  endtask

  function automatic logic [31:0] ram_word(input int a);
    return {u_ram.mem[a + 1], u_ram.mem[a]};
  endfunction

  task automatic put_word(input int a, input logic [31:0] w);
    u_ram.mem[a]     = w[15:0];
    u_ram.mem[a + 1] = w[31:16];
  endtask

  initial begin
    logic [31:0] dt, st;
    logic [63:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // processor puts the atoms into the RAM
    for (int c = 0; c < N; c++)
      for (int a = 0; a < M; a++) begin
        img[c][MS_F][a]   = rand_f(110, 140);
        img[c][MS_M][a]   = rand_f(110, 130);
        img[c][MS_VEL][a] = rand_f(110, 135);
        img[c][MS_POS][a] = rand_f(120, 140);
        for (int s = 0; s < 4; s++) put_word(((c * 4) + s) * AREA + 2 * a, img[c][s][a]);
      end
    dt = rand_f(118, 124);
    put_word(DT_ADDR, dt);
    for (int i = OUT_BASE; i < OUT_BASE + 2 * N * AREA; i++) u_ram.mem[i] = 16'h0;

    // DMA every array into its cell; one extra command while busy
    for (int c = 0; c < N; c++)
      for (int s = 0; s < 4; s++) begin
        if (c == 1 && s == 2) begin
          wreg(R_DP_ADDR, ((c * 4) + s) * AREA); wreg(R_CELL, c); wreg(R_MEMSEL, s);
          wreg(R_FADDR, 0); wreg(R_COUNT, M);
          wreg(R_CTRL, 1 << CTRL_LOAD);
          wreg(R_CTRL, 1 << CTRL_STORE);       // ignored: transfer in progress
          n_ignored++;
          wait_status(0, 1'b0);
          n_load++;
        end else dma(1, ((c * 4) + s) * AREA, c, memsel_e'(s), 0, M);
      end
    check(ram_word(((1 * 4) + 2) * AREA) == img[1][2][0], "ignored store left the RAM alone");
    dma(1, DT_ADDR, 0, MS_DT, 0, 1);
    n_dt++;

    // full run
    wreg(R_PROG_ADDR, 0);
    wreg(R_ADDR_STOP, M - 1);
    wreg(R_CTRL, 1 << CTRL_START);
    wait_status(1, 1'b1);
    n_run++;
    check(run_cycles == M + int'(CELL_LAT), "run: Start pulse + one atom per cycle + 22 latency");
    $display("full run: %0d cycles from Start to Stop for %0d atoms in each of %0d cells",
             run_cycles, M, N);

    // results back to the RAM
    for (int c = 0; c < N; c++) begin
      dma(0, OUT_BASE + (2 * c) * AREA,     c, MS_VEL_OUT, 0, M);
      dma(0, OUT_BASE + (2 * c + 1) * AREA, c, MS_POS_OUT, 0, M);
    end
    for (int c = 0; c < N; c++)
      for (int a = 0; a < M; a++) begin
        r = ref_verlet(img[c][MS_F][a], img[c][MS_M][a], img[c][MS_VEL][a], img[c][MS_POS][a], dt);
        check(ram_word(OUT_BASE + (2 * c) * AREA + 2 * a) == r[31:0], "vel in RAM");
        check(ram_word(OUT_BASE + (2 * c + 1) * AREA + 2 * a) == r[63:32], "pos in RAM");
      end

    // next time step over part of the atoms: new pos and dt
    for (int c = 0; c < N; c++)
      for (int a = 0; a < M; a++) begin
        img[c][MS_POS][a] = ram_word(OUT_BASE + (2 * c + 1) * AREA + 2 * a);
        img[c][MS_VEL][a] = ram_word(OUT_BASE + (2 * c) * AREA + 2 * a);
      end
    dt = rand_f(118, 124);
    put_word(DT_ADDR, dt);
    dma(1, DT_ADDR, 3, MS_DT, 0, 1);
    n_dt++;
    for (int c = 0; c < N; c++) begin
      dma(1, OUT_BASE + (2 * c) * AREA + 2 * 40,     c, MS_VEL, 40, 30);
      dma(1, OUT_BASE + (2 * c + 1) * AREA + 2 * 40, c, MS_POS, 40, 30);
    end
    wreg(R_PROG_ADDR, 40);
    wreg(R_ADDR_STOP, 69);
    wreg(R_CTRL, 1 << CTRL_START);
    wait_status(1, 1'b1);
    n_subrun++;
    check(run_cycles == 30 + int'(CELL_LAT), "sub-range run length");
    for (int c = 0; c < N; c++) begin
      dma(0, OUT_BASE + (2 * c + 1) * AREA, c, MS_POS_OUT, 0, M);
      for (int a = 0; a < M; a++) begin
        if (a >= 40 && a < 70) begin
          r = ref_verlet(img[c][MS_F][a], img[c][MS_M][a], img[c][MS_VEL][a], img[c][MS_POS][a], dt);
          check(ram_word(OUT_BASE + (2 * c + 1) * AREA + 2 * a) == r[63:32], "second step pos");
        end else
          check(ram_word(OUT_BASE + (2 * c + 1) * AREA + 2 * a) == img[c][MS_POS][a],
                "atoms outside the range keep the first step");
      end
    end

    // Reset aborts a run
    wreg(R_PROG_ADDR, 0);
    wreg(R_ADDR_STOP, M - 1);
    wreg(R_CTRL, 1 << CTRL_START);
    rreg(R_STATUS, st);
    check(st[2] && !st[1], "fabric running");
    wreg(R_CTRL, 1 << CTRL_FRESET);
    rreg(R_STATUS, st);
    check(st[2:0] == 3'b000, "Reset returns the fabric to idle");
    n_abort++;

    $display("mechanisms: loads %0d stores %0d dt %0d runs %0d subruns %0d ignored %0d aborts %0d stalls %0d",
             n_load, n_store, n_dt, n_run, n_subrun, n_ignored, n_abort, n_stall);
    check(n_load > 0 && n_store > 0 && n_dt > 0 && n_run > 0 && n_subrun > 0, "transfers and runs");
    check(n_ignored > 0 && n_abort > 0 && n_stall > 0, "busy command, abort and wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
