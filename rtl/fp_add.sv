// fp_add: pipelined IEEE-754 single-precision adder, y = a + b.
//
// Five register stages, one new operand pair accepted every cycle; y is the
// sum of the operands applied five clock edges earlier (md_pkg::ADD_LAT).
//   stage 1  unpack, order the operands so that |big| >= |small|
//   stage 2  align the small mantissa, keeping guard, round and sticky bits
//   stage 3  add or subtract the 27-bit mantissas
//   stage 4  normalise (one right shift or a leading-zero left shift)
//   stage 5  round to nearest, ties to even; range check, specials, pack
// The accelerator only asks for "pipelined IEEE 32-bit floating point
// modules"; their insides are this design's own. Subnormals are flushed to
// zero, overflow gives infinity, NaN results are the quiet NaN 0x7FC00000,
// and an exact cancellation gives +0 (-0 only for -0 + -0).
module fp_add
  import md_pkg::*;
(
  input  logic            clk,
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] y
);

  localparam logic [FP_W-1:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic nan;       // result is NaN
    logic inf;       // result is infinity
    logic inf_sign;  // sign of that infinity
    logic zsign;     // sign of a zero result
  } spec_t;

  // leading zeros of a 27-bit value (27 when it is zero)
  function automatic logic [4:0] lzc27(input logic [26:0] v);
    logic [4:0] n;
    logic       found;
    n = 5'd27;
    found = 1'b0;
    for (int bitpos = 26; bitpos >= 0; bitpos--) begin
      if (v[bitpos] && !found) begin
        n = 5'(26 - bitpos);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  // ---------------- stage 1: unpack and order ----------------
  logic        s1_sign, s1_sub;
  logic [7:0]  s1_exp, s1_diff;
  logic [23:0] s1_mbig, s1_msml;
  spec_t       s1_spec;

  always_ff @(posedge clk) begin
    logic [7:0]  ea, eb;
    logic [23:0] ma, mb;
    logic a_inf, b_inf, a_nan, b_nan, swap;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};   // flush subnormals
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_inf = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf = (eb == 8'hFF) && (b[22:0] == 23'd0);
    a_nan = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (eb == 8'hFF) && (b[22:0] != 23'd0);
    swap  = {eb, mb} > {ea, ma};
    s1_sign <= swap ? b[31] : a[31];
    s1_sub  <= a[31] ^ b[31];
    s1_exp  <= swap ? eb : ea;
    s1_diff <= swap ? (eb - ea) : (ea - eb);
    s1_mbig <= swap ? mb : ma;
    s1_msml <= swap ? ma : mb;
    s1_spec.nan      <= a_nan || b_nan || (a_inf && b_inf && (a[31] != b[31]));
    s1_spec.inf      <= a_inf || b_inf;
    s1_spec.inf_sign <= a_inf ? a[31] : b[31];
    s1_spec.zsign    <= a[31] && b[31];
  end

  // ---------------- stage 2: align ----------------
  logic        s2_sign, s2_sub;
  logic [7:0]  s2_exp;
  logic [26:0] s2_big, s2_sml;   // {mantissa, guard, round, sticky}
  spec_t       s2_spec;

  always_ff @(posedge clk) begin
    logic [49:0] wide;
    logic [26:0] shifted;
    wide = {s1_msml, 26'd0} >> s1_diff;
    // keep 26 bits below the mantissa's lsb position + 3; fold the rest into sticky
    shifted = {wide[49:24], |wide[23:0]};
    if (s1_diff > 8'd26)
      shifted = {26'd0, |s1_msml};
    s2_sign <= s1_sign;
    s2_sub  <= s1_sub;
    s2_exp  <= s1_exp;
    s2_big  <= {s1_mbig, 3'b000};
    s2_sml  <= shifted;
    s2_spec <= s1_spec;
  end

  // ---------------- stage 3: add / subtract ----------------
  logic        s3_sign;
  logic [7:0]  s3_exp;
  logic [27:0] s3_sum;
  spec_t       s3_spec;

  always_ff @(posedge clk) begin
    s3_sign <= s2_sign;
    s3_exp  <= s2_exp;
    s3_spec <= s2_spec;
    s3_sum  <= s2_sub ? ({1'b0, s2_big} - {1'b0, s2_sml})
                      : ({1'b0, s2_big} + {1'b0, s2_sml});
  end

  // ---------------- stage 4: normalise ----------------
  logic        s4_sign, s4_zero;
  logic signed [9:0] s4_exp;
  logic [26:0] s4_norm;          // bit 26 is the hidden one
  spec_t       s4_spec;

  always_ff @(posedge clk) begin
    logic [4:0] lz;
    lz = lzc27(s3_sum[26:0]);
    s4_sign <= s3_sign;
    s4_spec <= s3_spec;
    s4_zero <= (s3_sum == 28'd0);
    if (s3_sum[27]) begin
      s4_exp  <= $signed({2'b00, s3_exp}) + 10'sd1;
      s4_norm <= {s3_sum[27:2], s3_sum[1] | s3_sum[0]};
    end else begin
      s4_exp  <= $signed({2'b00, s3_exp}) - $signed({5'd0, lz});
      s4_norm <= s3_sum[26:0] << lz;
    end
  end

  // ---------------- stage 5: round, specials, pack ----------------
  always_ff @(posedge clk) begin
    logic [24:0] rounded;
    logic signed [9:0] e;
    logic        rnd, stk;
    rnd = s4_norm[2];
    stk = |s4_norm[1:0];
    rounded = {1'b0, s4_norm[26:3]} + 25'(rnd && (stk || s4_norm[3]));
    e = rounded[24] ? (s4_exp + 10'sd1) : s4_exp;
    if (s4_spec.nan)
      y <= QNAN;
    else if (s4_spec.inf)
      y <= {s4_spec.inf_sign, 8'hFF, 23'd0};
    else if (s4_zero)
      y <= {s4_spec.zsign, 31'd0};
    else if (e >= 10'sd255)
      y <= {s4_sign, 8'hFF, 23'd0};
    else if (e <= 10'sd0)
      y <= {s4_sign, 31'd0};
    else
      y <= {s4_sign, e[7:0], rounded[24] ? 23'd0 : rounded[22:0]};
  end

endmodule
