// md_top_fpga_sizes_tb: the accelerator at the two larger sizes the design
// targets, 20 cells (as fitted on an Altera Stratix EP1S80) and 15 cells (as
// fitted on a Xilinx Virtex-II Pro 2VP50), each with 128 atoms per cell. Both
// systems run side by side; each loads, runs, stores and checks a full time
// step for 2560 or 1920 atoms. The run must still take 128 + 22 cycles, since
// all cells work in parallel.
module md_top_fpga_sizes_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done20, done15;
  int   c20, f20, r20, c15, f15, r15;
  int   checks, failures;

  md_system_harness #(.N_CELLS(20)) u_n20 (.clk(clk), .rst_n(rst_n), .done(done20),
                                           .checks(c20), .failures(f20), .run_cycles(r20));
  md_system_harness #(.N_CELLS(15)) u_n15 (.clk(clk), .rst_n(rst_n), .done(done15),
                                           .checks(c15), .failures(f15), .run_cycles(r15));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c20 + c15, f20 + f15 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done20 && done15);
    checks   = c20 + c15;
    failures = f20 + f15;
    $display("20 cells: %0d cycles Start to Stop, %0d checks; 15 cells: %0d cycles, %0d checks",
             r20, c20, r15, c15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
