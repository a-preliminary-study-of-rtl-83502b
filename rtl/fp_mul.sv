// fp_mul: pipelined IEEE-754 single-precision multiplier, y = a * b.
//
// Five register stages, one new operand pair accepted every cycle; y is the
// product of the operands applied five clock edges earlier (md_pkg::MUL_LAT).
//   stage 1  unpack, flag zero / infinity / NaN
//   stage 2  24x24 mantissa product, exponent sum
//   stage 3  normalise the 48-bit product, form round and sticky bits
//   stage 4  round to nearest, ties to even
//   stage 5  overflow / underflow and special cases, pack
// The accelerator only asks for "pipelined IEEE 32-bit floating point
// modules"; their insides are this design's own. Subnormal inputs and
// results are flushed to zero (signed), overflow gives infinity, and every
// NaN result is the quiet NaN 0x7FC00000. There is no stall: the pipeline
// advances on every clock, as in the synchronised SIMD fabric it serves.
module fp_mul
  import md_pkg::*;
(
  input  logic            clk,
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] y
);

  localparam logic [FP_W-1:0] QNAN = 32'h7FC0_0000;

  // special-case summary carried along the pipe
  typedef struct packed {
    logic nan;   // result is NaN
    logic inf;   // result is infinity
    logic zero;  // result is zero
  } spec_t;

  // ---------------- stage 1: unpack ----------------
  logic        s1_sign;
  logic [7:0]  s1_ea, s1_eb;
  logic [23:0] s1_ma, s1_mb;
  spec_t       s1_spec;

  always_ff @(posedge clk) begin
    logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 23'd0);
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    s1_sign      <= a[31] ^ b[31];
    s1_ea        <= a[30:23];
    s1_eb        <= b[30:23];
    s1_ma        <= {1'b1, a[22:0]};
    s1_mb        <= {1'b1, b[22:0]};
    s1_spec.nan  <= a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
    s1_spec.inf  <= a_inf || b_inf;
    s1_spec.zero <= a_zero || b_zero;
  end

  // ---------------- stage 2: multiply ----------------
  logic        s2_sign;
  logic signed [9:0] s2_exp;
  logic [47:0] s2_prod;
  spec_t       s2_spec;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sign;
    s2_exp  <= $signed({2'b00, s1_ea}) + $signed({2'b00, s1_eb}) - 10'sd127;
    s2_prod <= s1_ma * s1_mb;
    s2_spec <= s1_spec;
  end

  // ---------------- stage 3: normalise ----------------
  logic        s3_sign;
  logic signed [9:0] s3_exp;
  logic [23:0] s3_man;
  logic        s3_rnd, s3_stk;
  spec_t       s3_spec;

  always_ff @(posedge clk) begin
    s3_sign <= s2_sign;
    s3_spec <= s2_spec;
    if (s2_prod[47]) begin
      s3_exp <= s2_exp + 10'sd1;
      s3_man <= s2_prod[47:24];
      s3_rnd <= s2_prod[23];
      s3_stk <= |s2_prod[22:0];
    end else begin
      s3_exp <= s2_exp;
      s3_man <= s2_prod[46:23];
      s3_rnd <= s2_prod[22];
      s3_stk <= |s2_prod[21:0];
    end
  end

  // ---------------- stage 4: round ----------------
  logic        s4_sign;
  logic signed [9:0] s4_exp;
  logic [22:0] s4_frac;
  spec_t       s4_spec;

  always_ff @(posedge clk) begin
    logic [24:0] rounded;
    rounded = {1'b0, s3_man} + 25'(s3_rnd && (s3_stk || s3_man[0]));
    s4_sign <= s3_sign;
    s4_spec <= s3_spec;
    if (rounded[24]) begin
      s4_exp  <= s3_exp + 10'sd1;
      s4_frac <= 23'd0;              // 1.111..1 rounded up to 10.000..0
    end else begin
      s4_exp  <= s3_exp;
      s4_frac <= rounded[22:0];
    end
  end

  // ---------------- stage 5: range check, specials, pack ----------------
  always_ff @(posedge clk) begin
    if (s4_spec.nan)
      y <= QNAN;
    else if (s4_spec.inf || s4_exp >= 10'sd255)
      y <= {s4_sign, 8'hFF, 23'd0};
    else if (s4_spec.zero || s4_exp <= 10'sd0)
      y <= {s4_sign, 31'd0};
    else
      y <= {s4_sign, s4_exp[7:0], s4_frac};
  end

endmodule
