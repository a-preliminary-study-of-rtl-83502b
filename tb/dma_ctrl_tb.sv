// dma_ctrl_tb: self-checking test of the DMA controller.
// A dual-port RAM model and a model of the fabric's memory port (six
// memories per cell, dt register, one-cycle reads) surround the block.
// LOAD transfers must place each pair of 16-bit RAM words, low half first,
// in the selected fabric memory; STORE transfers the reverse. Each transfer
// must take 3 cycles per word. A command written during a transfer must be
// ignored; START and FRESET must give one-cycle pulses; register readback and
// the status bits are checked.
module dma_ctrl_tb;
  import md_pkg::*;

  localparam int M_DEPTH = 128;
  localparam int AW      = $clog2(M_DEPTH);
  localparam int NC      = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  reg_e             reg_addr;
  logic [31:0]      reg_wdata, reg_rdata;
  logic             reg_wr;
  logic [DP_AW-1:0] dp_addr;
  logic             dp_wr, dp_rd;
  logic [DP_DW-1:0] dp_wdata, dp_rdata;
  fab_req_t         fab_req;
  logic [31:0]      fab_rdata;
  logic             f_reset, f_start, f_stop, f_busy;
  logic [AW-1:0]    f_addr_stop, f_prog_addr;
  int               checks = 0, failures = 0, cyc = 0;
  int               start_pulses = 0, reset_pulses = 0, busy_cycles = 0;

  dma_ctrl #(.M_DEPTH(M_DEPTH)) dut (.*);
  dpram_model u_ram (.clk(clk), .addr(dp_addr), .wr(dp_wr), .rd(dp_rd),
                     .wdata(dp_wdata), .rdata(dp_rdata));

  // fabric memory-port model
  logic [31:0] fmem [NC][8][M_DEPTH];
  always @(posedge clk) begin
    if (fab_req.wr) fmem[fab_req.cell_sel][fab_req.memsel][fab_req.addr] <= fab_req.wdata;
    if (fab_req.rd) fab_rdata <= fmem[fab_req.cell_sel][fab_req.memsel][fab_req.addr];
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (f_start) start_pulses++;
    if (f_reset) reset_pulses++;
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic wreg(input reg_e a, input logic [31:0] d);
    @(negedge clk);
    reg_addr = a; reg_wdata = d; reg_wr = 1;
    @(negedge clk);
    reg_wr = 0;
  endtask

  task automatic rreg(input reg_e a, output logic [31:0] d);
    reg_addr = a;
    #1;
    d = reg_rdata;
  endtask

  // program and run one transfer; returns the cycles it was busy
  task automatic xfer(input bit load, input int dpa, input int c, input memsel_e s,
                      input int fa, input int n, output int busy);
    wreg(R_DP_ADDR, dpa);
    wreg(R_CELL, c);
    wreg(R_MEMSEL, s);
    wreg(R_FADDR, fa);
    wreg(R_COUNT, n);
    wreg(R_CTRL, load ? (1 << CTRL_LOAD) : (1 << CTRL_STORE));
    busy = 0;                       // wreg returns in the first busy cycle
    reg_addr = R_STATUS;
    #1;
    while (reg_rdata[0]) begin
      busy++;
      @(negedge clk);
      #1;
    end
  endtask

  initial begin
    int b;
    logic [31:0] rv;
    reg_addr = R_CTRL; reg_wdata = 0; reg_wr = 0; f_stop = 0; f_busy = 0;
    for (int i = 0; i < 4096; i++) u_ram.mem[i] = 16'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rreg(R_STATUS, rv);
    check(rv == 0, "idle after reset");
    // register readback
    wreg(R_ADDR_STOP, 77);
    wreg(R_PROG_ADDR, 12);
    rreg(R_ADDR_STOP, rv);
    check(rv == 77 && f_addr_stop == 77, "AddressStop register");
    rreg(R_PROG_ADDR, rv);
    check(rv == 12 && f_prog_addr == 12, "ProgramAddress register");
    // a full memory load, then partial loads into other cells and memories
    xfer(1, 0, 2, MS_VEL, 0, M_DEPTH, b);
        check(b == 3 * M_DEPTH, "load takes 3 cycles per word");
    for (int i = 0; i < M_DEPTH; i++)
      check(fmem[2][MS_VEL][i] == {u_ram.mem[2*i+1], u_ram.mem[2*i]}, "loaded word");
    xfer(1, 1000, 3, MS_POS, 50, 10, b);
    check(b == 30, "partial load length");
    for (int i = 0; i < 10; i++)
      check(fmem[3][MS_POS][50+i] == {u_ram.mem[1000+2*i+1], u_ram.mem[1000+2*i]}, "partial load word");
    xfer(1, 2000, 0, MS_DT, 0, 1, b);
    check(fmem[0][MS_DT][0] == {u_ram.mem[2001], u_ram.mem[2000]}, "dt load");
    // store back into another area
    for (int i = 0; i < M_DEPTH; i++) fmem[1][MS_POS_OUT][i] = $urandom;
    xfer(0, 3000, 1, MS_POS_OUT, 0, M_DEPTH, b);
    check(b == 3 * M_DEPTH, "store takes 3 cycles per word");
    for (int i = 0; i < M_DEPTH; i++) begin
      check(u_ram.mem[3000+2*i]   == fmem[1][MS_POS_OUT][i][15:0],  "stored low half");
      check(u_ram.mem[3000+2*i+1] == fmem[1][MS_POS_OUT][i][31:16], "stored high half");
    end
    // a command during a transfer is ignored
    wreg(R_DP_ADDR, 0); wreg(R_CELL, 0); wreg(R_MEMSEL, MS_F); wreg(R_FADDR, 0); wreg(R_COUNT, 20);
    wreg(R_CTRL, 1 << CTRL_LOAD);
    wreg(R_CTRL, 1 << CTRL_STORE);
    b = 2;                          // two busy cycles passed during the second wreg
    reg_addr = R_STATUS;
    #1;
    while (reg_rdata[0]) begin b++; @(negedge clk); #1; end
        check(b == 60, "second command ignored while busy");
    check(u_ram.mem[0] == fmem[0][MS_F][0][15:0], "no store happened");
    // zero count does nothing
    wreg(R_COUNT, 0);
    wreg(R_CTRL, 1 << CTRL_LOAD);
    rreg(R_STATUS, rv);
    check(rv == 0, "zero count is a no-op");
    // fabric control
    wreg(R_CTRL, 1 << CTRL_START);
    @(negedge clk);
    check(start_pulses == 1 && reset_pulses == 0, "one Start pulse");
    wreg(R_CTRL, 1 << CTRL_FRESET);
    @(negedge clk);
    check(start_pulses == 1 && reset_pulses == 1, "one Reset pulse");
    f_stop = 1;
    rreg(R_STATUS, rv);
    check(rv == 32'h2, "status shows Stop");
    f_stop = 0; f_busy = 1;
    rreg(R_STATUS, rv);
    check(rv == 32'h4, "status shows fabric running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
