// cell_mem_tb: self-checking test of the dual-port local memory.
// Random reads and writes on both ports every cycle are compared against a
// model array: synchronous reads, read data held while rd is low, a write on
// one port seen by the other on the next read, port B winning a same-word
// write collision.
module cell_mem_tb;
  localparam int DEPTH = 128;
  localparam int W     = 32;
  localparam int AW    = $clog2(DEPTH);
  localparam int NCYC  = 5000;

  logic          clk = 1'b0;
  logic          a_rd, a_wr, b_rd, b_wr;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0]  model [DEPTH];
  logic [W-1:0]  exp_a, exp_b;
  int            checks = 0, failures = 0, collisions = 0;

  cell_mem #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 3 * DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_rd = 0; a_wr = 0; b_rd = 0; b_wr = 0;
    a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise every word through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_wr = 1; a_addr = AW'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk);
    a_wr = 0;
    // read every word through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (b_rdata !== model[i-1]) failures++;
      end
      b_rd = 1; b_addr = AW'(i);
    end
    @(negedge clk);
    checks++;
    if (b_rdata !== model[DEPTH-1]) failures++;
    b_rd = 0;
    exp_a = a_rdata;
    exp_b = b_rdata;
    // random traffic on both ports
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      // results of the previous cycle
      checks += 2;
      if (a_rdata !== exp_a) failures++;
      if (b_rdata !== exp_b) failures++;
      a_rd = 1'($urandom); a_wr = 1'($urandom); b_rd = 1'($urandom); b_wr = 1'($urandom);
      a_addr = AW'($urandom % 8); b_addr = AW'($urandom % 8);   // small range: many collisions
      a_wdata = $urandom; b_wdata = $urandom;
      // reads see the memory before this cycle's writes
      if (a_rd) exp_a = model[a_addr];
      if (b_rd) exp_b = model[b_addr];
      if (a_wr) model[a_addr] = a_wdata;
      if (b_wr) model[b_addr] = b_wdata;
      if (a_wr && b_wr && a_addr == b_addr) collisions++;
    end
    @(negedge clk);
    a_rd = 0; a_wr = 0; b_rd = 0; b_wr = 0;
    checks += 2;
    if (a_rdata !== exp_a) failures++;
    if (b_rdata !== exp_b) failures++;
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
