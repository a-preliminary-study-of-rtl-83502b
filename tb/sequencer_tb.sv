// sequencer_tb: self-checking test of the shared fabric controller.
// Each run's issued addresses are compared with the expected range, Stop
// must rise exactly CELL_LAT cycles after the last address and stay high,
// a Start during a run must be ignored, a wrapping range must work, and
// Reset must abort a run.
module sequencer_tb;
  import md_pkg::*;

  localparam int M_DEPTH = 128;
  localparam int AW      = $clog2(M_DEPTH);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          f_reset, start, seq_valid, stop, busy;
  logic [AW-1:0] prog_addr, addr_stop, seq_addr;
  int            checks = 0, failures = 0, cyc = 0;
  int            ignored_starts = 0, aborts = 0;

  sequencer #(.M_DEPTH(M_DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // one run from p to s; optionally pulse Start again in the middle
  task automatic run(input int p, input int s, input bit restart);
    int n, expect_addr, t_last, k;
    n = ((s - p + M_DEPTH) % M_DEPTH) + 1;
    @(negedge clk);
    prog_addr = AW'(p); addr_stop = AW'(s); start = 1;
    @(negedge clk);
    start = 0;
    prog_addr = AW'($urandom); addr_stop = AW'($urandom);   // must be latched
    expect_addr = p;
    for (k = 0; k < n; k++) begin
      check(seq_valid && seq_addr == AW'(expect_addr), "address sequence");
      check(busy && !stop, "busy while issuing");
      if (restart && k == n / 2) begin
        start = 1;
        ignored_starts++;
      end else start = 0;
      expect_addr = (expect_addr + 1) % M_DEPTH;
      t_last = cyc;
      @(negedge clk);
    end
    start = 0;
    // cycles after the last address: Stop exactly at CELL_LAT
    for (k = 1; k < int'(CELL_LAT); k++) begin
      check(!seq_valid && !stop && busy, "draining");
      @(negedge clk);
    end
    check(cyc - t_last == int'(CELL_LAT), "stop latency");
    check(stop && !busy && !seq_valid, "stop raised");
    repeat (5) @(negedge clk);
    check(stop, "stop held");
  endtask

  initial begin
    f_reset = 0; start = 0; prog_addr = 0; addr_stop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!stop && !busy && !seq_valid, "idle after reset");
    run(0, M_DEPTH - 1, 0);     // full memory
    run(10, 10, 0);             // one atom
    run(5, 40, 1);              // Start during the run is ignored
    run(120, 7, 0);             // range wraps around
    // Reset aborts a run
    @(negedge clk);
    prog_addr = 0; addr_stop = 100; start = 1;
    @(negedge clk);
    start = 0;
    repeat (20) @(negedge clk);
    f_reset = 1;
    @(negedge clk);
    f_reset = 0;
    check(!seq_valid && !busy && !stop, "reset aborts");
    aborts++;
    repeat (40) @(negedge clk);
    check(!stop && !busy, "stays idle after reset");
    run(3, 9, 0);
    check(ignored_starts == 1 && aborts == 1, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
