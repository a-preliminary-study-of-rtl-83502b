// slave_ctrl_tb: self-checking test of the AHB slave controller.
// A register-file model answers the register port. Random word writes and
// reads through the bus model must reach the right register with the right
// data, exactly once each; a write followed back to back by a read of the
// same register must return the new value; IDLE transfers, transfers with
// hsel low and cycles with hready low from another slave must cause no
// access. The slave must always be ready and answer OKAY.
module slave_ctrl_tb;
  import md_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hsel, hwrite, hready, hreadyout, stall;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans, hresp;
  logic [2:0]  hsize;
  reg_e        reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic        reg_wr, reg_rd;
  logic [31:0] regs [16];
  logic [31:0] model [16];
  int          checks = 0, failures = 0, nwr = 0, nrd = 0, stalls = 0;

  slave_ctrl dut (.*);
  ahb_master_bfm bfm (.clk(clk), .hsel(hsel), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
                      .hsize(hsize), .hwdata(hwdata), .hready(hready), .hreadyout(hreadyout),
                      .hrdata(hrdata), .stall(stall));

  // register-file model behind the slave
  assign reg_rdata = regs[reg_addr];
  always @(posedge clk) begin
    if (reg_wr) begin
      regs[reg_addr] <= reg_wdata;
      nwr++;
    end
    if (reg_rd) nrd++;
    if (!hready) stalls++;
  end

  always #5 clk = ~clk;

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
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // a foreign slave's wait states now and then
  initial begin
    stall = 0;
    forever begin
      @(negedge clk);
      stall = ($urandom % 5) == 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (!hreadyout || hresp != 2'b00) failures++;
    end
  end

  initial begin
    logic [31:0] d;
    int          a, w0, r0;
    for (int i = 0; i < 16; i++) begin regs[i] = 0; model[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      a = $urandom % 16;
      w0 = nwr; r0 = nrd;
      case ($urandom % 3)
        0: begin
          d = $urandom;
          bfm.write(32'(a * 4), d);
          model[a] = d;
          check(nwr == w0 + 1 && nrd == r0, "one register write");
        end
        1: begin
          bfm.read(32'(a * 4), d);
          check(d == model[a] && nrd == r0 + 1 && nwr == w0, "register read");
        end
        default: begin
          logic [31:0] wd;
          wd = $urandom;
          bfm.write_read(32'(a * 4), wd, 32'(a * 4), d);
          model[a] = wd;
          check(d == wd, "back-to-back write then read");
        end
      endcase
      check(regs[a] == model[a], "register content");
    end
    // no access for IDLE or deselected transfers
    w0 = nwr; r0 = nrd;
    @(negedge clk);
    hsel = 1; htrans = 2'b00; hwrite = 1; haddr = 0;
    @(negedge clk);
    hsel = 0; htrans = 2'b10;
    @(negedge clk);
    bfm.idle();
    repeat (3) @(negedge clk);
    check(nwr == w0 && nrd == r0, "IDLE and hsel-low transfers ignored");
    check(stalls > 0, "hready-low cycles were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
