// verlet_datapath_tb: self-checking test of the pipelined Verlet data-path.
// Random atoms enter with in_valid mostly high; each result must leave with
// its tag exactly DP_LAT cycles after it entered and equal, bit for bit,
// vel' = vel + f*M and pos' = pos + dt*vel' rounded like the reference.
// dt changes between bursts, after the pipeline has drained.
module verlet_datapath_tb;
  import md_pkg::*;
  import fp_ref_pkg::*;

  localparam int NATOMS = 3000;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          in_valid, out_valid;
  logic [6:0]    in_tag, out_tag;
  logic [31:0]   f, m, vel, pos, dt, vel_new, pos_new;
  int            checks = 0, failures = 0, cyc = 0, sent = 0, got = 0;

  typedef struct { logic [63:0] res; logic [6:0] tag; int t; } exp_t;
  exp_t expq [$];

  verlet_datapath #(.TAG_W(7)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2 * NATOMS + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      got++;
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        e = expq.pop_front();
        if ({pos_new, vel_new} !== e.res || out_tag !== e.tag || cyc - e.t != DP_LAT) begin
          failures++;
          if (failures < 10)
            $display("atom tag %0d: got v=%08h p=%08h after %0d, expected v=%08h p=%08h after %0d",
                     out_tag, vel_new, pos_new, cyc - e.t, e.res[31:0], e.res[63:32], DP_LAT);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_tag = 0; f = 0; m = 0; vel = 0; pos = 0; dt = 32'h3C23_D70A; // 0.01
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 3; burst++) begin
      @(negedge clk);
      dt = rand_f(115, 125);
      for (int i = 0; i < NATOMS / 3; i++) begin
        @(negedge clk);
        in_valid = ($urandom % 8) != 0;
        in_tag   = 7'(sent);
        f   = rand_f(110, 140);
        m   = rand_f(110, 130);
        vel = rand_f(110, 135);
        pos = rand_f(120, 140);
        if (in_valid) begin
          expq.push_back('{ref_verlet(f, m, vel, pos, dt), in_tag, cyc});
          sent++;
        end
      end
      @(negedge clk);
      in_valid = 0;
      repeat (DP_LAT + 2) @(negedge clk);
    end
    checks++;
    if (got != sent || expq.size() != 0) failures++;
    $display("atoms sent %0d, results %0d", sent, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
