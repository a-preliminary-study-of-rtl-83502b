// fp_add_tb: self-checking test of the pipelined single-precision adder.
// One operand pair enters per cycle; each sum is checked bit-exactly
// against the reference exactly ADD_LAT cycles later. Directed cases cover
// zeros, infinities, NaN, overflow, underflow and rounding carries.
module fp_add_tb;
  import md_pkg::*;
  import fp_ref_pkg::*;

  localparam int NRAND = 4000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int          checks = 0, failures = 0;
  logic [31:0] expq [$];
  int          cyc = 0;

  fp_add dut (.clk(clk), .a(a), .b(b), .y(y));

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
    // check the result of the pair applied ADD_LAT cycles ago
    if (expq.size() == ADD_LAT) begin
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
    expq.push_back(ref_add(x, z));
    cyc++;
  endtask

  initial begin
    logic [31:0] directed [][2] = '{
      '{32'h3F80_0000, 32'h3F80_0000},   // 1+1
      '{32'h4000_0000, 32'hC040_0000},   // 2+-3
      '{32'h3F80_0000, 32'hBF80_0000},   // 1+-1 = +0
      '{32'h8000_0000, 32'h8000_0000},   // -0+-0 = -0
      '{32'h0000_0000, 32'hC120_0000},   // 0+-10
      '{32'h7F80_0000, 32'h4120_0000},   // inf+10
      '{32'h7F80_0000, 32'hFF80_0000},   // inf-inf -> NaN
      '{32'h7FC0_1234, 32'h3F80_0000},   // NaN
      '{32'h7F7F_FFFF, 32'h7F7F_FFFF},   // overflow
      '{32'h0080_0001, 32'h8080_0000},   // cancels into subnormal -> 0
      '{32'h4B7F_FFFF, 32'h3F00_0000},   // tie, round to even
      '{32'h4B7F_FFFF, 32'h3F00_0001},   // above tie, carry out
      '{32'h3F80_0000, 32'h3380_0000}    // far below half an ulp
    };
    a = 0;
    b = 0;
    foreach (directed[i]) apply(directed[i][0], directed[i][1]);
    for (int i = 0; i < NRAND; i++) begin
      logic [31:0] x;
      x = rand_f(64, 190);
      case (i % 8)
        0: apply(rand_f(1, 254), rand_f(1, 254));               // any exponents
        1: apply(x, {~x[31], x[30:8], 8'($urandom)});            // near cancellation
        2: apply(x, {~x[31], x[30:23], 23'($urandom)});          // same exponent, subtract
        3: apply(x, {x[31], 8'(x[30:23] - 8'($urandom % 30)), 23'($urandom)}); // close exponents
        default: apply(x, rand_f(64, 190));
      endcase
    end
    repeat (ADD_LAT) apply(32'd0, 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
