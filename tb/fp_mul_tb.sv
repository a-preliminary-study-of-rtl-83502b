// fp_mul_tb: self-checking test of the pipelined single-precision multiplier.
// One operand pair enters per cycle; each product is checked bit-exactly
// against the reference exactly MUL_LAT cycles later. Directed cases cover
// zeros, infinities, NaN, overflow, underflow and rounding carries.
module fp_mul_tb;
  import md_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 4000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;
  logic [31:0] expq [$];
  int          cyc = 0;

  fp_mul dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (NRAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] z);
    @(negedge clk);
    // check the result of the pair applied MUL_LAT cycles ago
    if (expq.size() == MUL_LAT) begin
      logic [31:0] e;
      e = expq.pop_front();
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %08h expected %08h", cyc, y, e);
      end
    end
    a = x;
    b = z;
    expq.push_back(ref_mul(x, z));
    cyc++;
  endtask

  initial begin
    logic [31:0] directed [][2] = '{
      '{32'h3F80_0000, 32'h3F80_0000},   // 1*1
      '{32'h4000_0000, 32'hC040_0000},   // 2*-3
      '{32'h0000_0000, 32'h4120_0000},   // 0*10
      '{32'h8000_0000, 32'h4120_0000},   // -0*10
      '{32'h7F80_0000, 32'h4120_0000},   // inf*10
      '{32'h7F80_0000, 32'h0000_0000},   // inf*0 -> NaN
      '{32'h7FC0_1234, 32'h3F80_0000},   // NaN
      '{32'h7F00_0000, 32'h7F00_0000},   // overflow
      '{32'h0080_0000, 32'h0080_0000},   // underflow -> 0
      '{32'h0040_0000, 32'h4000_0000},   // subnormal input flushed
      '{32'h3FFF_FFFF, 32'h3FFF_FFFF},   // rounding carry
      '{32'h3F80_0001, 32'h3F7F_FFFF},
      '{32'h0100_0000, 32'h3F00_0000}    // result exactly min normal
    };
    a = 0;
    b = 0;
    foreach (directed[i]) apply(directed[i][0], directed[i][1]);
    for (int i = 0; i < NRAND; i++) begin
      if (i % 16 == 0) apply(rand_f(1, 254), rand_f(1, 254));
      else apply(rand_f(64, 190), rand_f(64, 190));
    end
    repeat (MUL_LAT) apply(32'd0, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
