// fabric_tb: self-checking test of the whole fabric at its default size.
// Every cell is loaded through the memory port with its own atoms, dt is
// written once for all cells, a full run is started, and Stop must rise
// exactly M_DEPTH-1+CELL_LAT cycles after the first address (one atom per
// cycle per cell). All results are read back and compared with the
// reference. A second run over a sub-range must update only that range.
// Reads of dt and of a cell that does not exist are checked too.
module fabric_tb;
  import md_pkg::*;
  import fp_ref_pkg::*;

  localparam int N_CELLS = 5;
  localparam int M_DEPTH = 128;
  localparam int AW      = $clog2(M_DEPTH);

  logic          clk = 1'b0, rst_n = 1'b0;
  fab_req_t      req;
  logic [31:0]   rdata, dt;
  logic          f_reset, start, stop, busy;
  logic [AW-1:0] addr_stop, prog_addr;
  logic [31:0]   img [N_CELLS][4][M_DEPTH];
  logic [31:0]   pos1 [N_CELLS][M_DEPTH];   // results of the first run
  int            checks = 0, failures = 0, cyc = 0;

  fabric #(.N_CELLS(N_CELLS), .M_DEPTH(M_DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  task automatic fwrite(input int c, input memsel_e s, input int a, input logic [31:0] d);
    @(negedge clk);
    req = '0;
    req.cell_sel = CELL_SEL_W'(c); req.memsel = s; req.addr = ATOM_AW'(a);
    req.wdata = d; req.wr = 1;
    @(negedge clk);
    req.wr = 0;
  endtask

  task automatic fread(input int c, input memsel_e s, input int a, output logic [31:0] d);
    @(negedge clk);
    req = '0;
    req.cell_sel = CELL_SEL_W'(c); req.memsel = s; req.addr = ATOM_AW'(a); req.rd = 1;
    @(negedge clk);
    req.rd = 0;
    req.cell_sel = CELL_SEL_W'($urandom);
    d = rdata;
  endtask

  // start a run of p..s and return the cycles from the first address to Stop
  task automatic run(input int p, input int s, output int cycles);
    int t0;
    @(negedge clk);
    prog_addr = AW'(p); addr_stop = AW'(s); start = 1;
    @(negedge clk);
    start = 0;
    t0 = cyc;                       // first address is presented now
    while (!stop) @(negedge clk);
    cycles = cyc - t0;
  endtask

  initial begin
    logic [31:0] d;
    logic [63:0] r;
    int          cycles;
    req = '0; f_reset = 0; start = 0; addr_stop = 0; prog_addr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    dt = rand_f(118, 124);
    fwrite(3, MS_DT, 0, dt);
    fread(0, MS_DT, 0, d);
    check(d == dt, "dt readback");
    for (int c = 0; c < N_CELLS; c++)
      for (int a = 0; a < M_DEPTH; a++) begin
        img[c][MS_F][a]   = rand_f(110, 140);
        img[c][MS_M][a]   = rand_f(110, 130);
        img[c][MS_VEL][a] = rand_f(110, 135);
        img[c][MS_POS][a] = rand_f(120, 140);
        for (int s = 0; s < 4; s++) fwrite(c, memsel_e'(s), a, img[c][s][a]);
      end
    fwrite(N_CELLS, MS_F, 0, 32'hDEAD_BEEF);        // no such cell: ignored
    fread(N_CELLS, MS_F, 0, d);
    check(d == 0, "missing cell reads zero");
    fread(0, MS_F, 0, d);
    check(d == img[0][MS_F][0], "missing-cell write did not alias");
    // full run
    run(0, M_DEPTH - 1, cycles);
    check(cycles == M_DEPTH - 1 + int'(CELL_LAT), "full run: one atom per cycle, 22 cycles latency");
    $display("full run of %0d atoms x %0d cells: %0d cycles", M_DEPTH, N_CELLS, cycles);
    for (int c = 0; c < N_CELLS; c++)
      for (int a = 0; a < M_DEPTH; a++) begin
        r = ref_verlet(img[c][MS_F][a], img[c][MS_M][a], img[c][MS_VEL][a], img[c][MS_POS][a], dt);
        fread(c, MS_VEL_OUT, a, d);
        check(d == r[31:0], "vel result");
        fread(c, MS_POS_OUT, a, d);
        check(d == r[63:32], "pos result");
        pos1[c][a] = d;
      end
    // sub-range run with a new dt and new vel inputs
    dt = rand_f(118, 124);
    fwrite(0, MS_DT, 0, dt);
    for (int c = 0; c < N_CELLS; c++)
      for (int a = 0; a < M_DEPTH; a++) begin
        img[c][MS_VEL][a] = rand_f(110, 135);
        fwrite(c, MS_VEL, a, img[c][MS_VEL][a]);
      end
    run(20, 59, cycles);
    check(cycles == 40 - 1 + int'(CELL_LAT), "sub-range run length");
    for (int c = 0; c < N_CELLS; c++)
      for (int a = 0; a < M_DEPTH; a += 3) begin
        fread(c, MS_POS_OUT, a, d);
        if (a >= 20 && a <= 59) begin
          r = ref_verlet(img[c][MS_F][a], img[c][MS_M][a], img[c][MS_VEL][a], img[c][MS_POS][a], dt);
          check(d == r[63:32], "sub-range result");
        end else begin
          check(d == pos1[c][a], "outside sub-range untouched");
        end
      end
    // Reset clears Stop
    @(negedge clk);
    f_reset = 1;
    @(negedge clk);
    f_reset = 0;
    check(!stop && !busy, "reset clears stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
