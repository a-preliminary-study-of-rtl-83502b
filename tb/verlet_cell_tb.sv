// verlet_cell_tb: self-checking test of one Verlet cell.
// The host port fills f, M, vel and pos with random atoms and reads every
// memory back; the test then plays the sequencer, issuing all addresses one
// per cycle, and checks every vel_out/pos_out word against the reference.
// A single-atom run checks the latency: the result is not readable 21 cycles
// after the address was issued, and is readable after 22.
module verlet_cell_tb;
  import md_pkg::*;
  import fp_ref_pkg::*;

  localparam int M_DEPTH = 128;
  localparam int AW      = $clog2(M_DEPTH);

  logic            clk = 1'b0, rst_n = 1'b0;
  memsel_e         h_memsel;
  logic [AW-1:0]   h_addr, seq_addr;
  logic [31:0]     h_wdata, h_rdata, dt;
  logic            h_wr, h_rd, seq_valid;
  logic [31:0]     img [6][M_DEPTH];
  int              checks = 0, failures = 0;

  verlet_cell #(.M_DEPTH(M_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(input memsel_e s, input int a, input logic [31:0] d);
    @(negedge clk);
    h_memsel = s; h_addr = AW'(a); h_wdata = d; h_wr = 1; h_rd = 0;
    @(negedge clk);
    h_wr = 0;
  endtask

  task automatic hread(input memsel_e s, input int a, output logic [31:0] d);
    @(negedge clk);
    h_memsel = s; h_addr = AW'(a); h_rd = 1; h_wr = 0;
    @(negedge clk);
    h_rd = 0;
    h_memsel = memsel_e'($urandom % 6);   // read data must not follow memsel
    #1;
    d = h_rdata;
  endtask

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [31:0] d;
    logic [63:0] r;
    h_memsel = MS_F; h_addr = 0; h_wdata = 0; h_wr = 0; h_rd = 0;
    seq_valid = 0; seq_addr = 0;
    dt = rand_f(118, 124);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill the inputs, clear the outputs
    for (int a = 0; a < M_DEPTH; a++) begin
      img[MS_F][a]   = rand_f(110, 140);
      img[MS_M][a]   = rand_f(110, 130);
      img[MS_VEL][a] = rand_f(110, 135);
      img[MS_POS][a] = rand_f(120, 140);
      img[MS_VEL_OUT][a] = 0;
      img[MS_POS_OUT][a] = 0;
      for (int s = 0; s < 6; s++) hwrite(memsel_e'(s), a, img[s][a]);
    end
    // read all six memories back
    for (int a = 0; a < M_DEPTH; a += 7)
      for (int s = 0; s < 6; s++) begin
        hread(memsel_e'(s), a, d);
        check(d == img[s][a], "memory readback");
      end
    // run every atom, one per cycle
    @(negedge clk);
    for (int a = 0; a < M_DEPTH; a++) begin
      seq_valid = 1; seq_addr = AW'(a);
      @(negedge clk);
    end
    seq_valid = 0;
    repeat (CELL_LAT) @(negedge clk);
    for (int a = 0; a < M_DEPTH; a++) begin
      r = ref_verlet(img[MS_F][a], img[MS_M][a], img[MS_VEL][a], img[MS_POS][a], dt);
      hread(MS_VEL_OUT, a, d);
      check(d == r[31:0], "vel result");
      hread(MS_POS_OUT, a, d);
      check(d == r[63:32], "pos result");
      hread(MS_VEL, a, d);
      check(d == img[MS_VEL][a], "inputs untouched");
    end
    // latency of one atom: issue at cycle 0, read at 21 (old) and 22 (new)
    hwrite(MS_POS_OUT, 5, 32'h0);
    hwrite(MS_VEL, 5, 32'h4000_0000);
    r = ref_verlet(img[MS_F][5], img[MS_M][5], 32'h4000_0000, img[MS_POS][5], dt);
    @(negedge clk);
    seq_valid = 1; seq_addr = 5;
    @(negedge clk);                        // cycle 1
    seq_valid = 0;
    repeat (CELL_LAT - 2) @(negedge clk);  // now in cycle CELL_LAT-1
    h_memsel = MS_POS_OUT; h_addr = 5; h_rd = 1;
    @(negedge clk);                        // cycle CELL_LAT
    check(h_rdata == 32'h0, "not yet written after CELL_LAT-1 cycles");
    @(negedge clk);
    h_rd = 0;
    check(h_rdata == r[63:32], "written after CELL_LAT cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
