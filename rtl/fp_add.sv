// Pipelined single-precision floating-point add-subtractor, latency 5 cycles.
//
// y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest even. One
// operation may enter every cycle; the result of operands sampled at clock
// edge n appears after edge n+5 with out_valid high. The latency of 5 is the
// document's figure; the stage split is this design's own:
//   1 unpack, order the operands by magnitude, exponent difference
//   2 align the smaller mantissa (guard, round and sticky bits kept)
//   3 add or subtract the mantissas
//   4 normalise (right by one on carry-out, left by the leading-zero count)
//   5 round to nearest even and pack
// Subnormal inputs count as zero and subnormal results flush to zero; a NaN
// or infinity input gives a quiet NaN; overflow gives infinity. An exact
// zero difference is +0. Only the valid bits are reset.
module fp_add
  import recsip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sub,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  typedef struct packed {
    logic               sign;    // sign of the larger operand, i.e. of the result
    logic               eff_sub; // magnitudes are subtracted
    logic               nan;
    logic               both_zero;
    logic               zsign;   // sign of a sum of two zeros
    logic signed [9:0]  exp;
  } ctl_t;

  // combinational unpack for stage 1
  logic        sb;
  logic        a_big;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;

  always_comb begin
    sb    = b[31] ^ sub;
    ea    = a[30:23];
    eb    = b[30:23];
    ma    = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb    = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_big = {ea, ma} >= {eb, mb};
  end

  ctl_t        c1, c2, c3, c4;
  logic [23:0] mbig1, msml1;
  logic [7:0]  d1;
  logic [26:0] big2, sml2;
  logic [27:0] sum3;
  logic [26:0] n4;
  fp32_t       y5;
  logic [4:0]  vld;

  // stage 2 alignment, combinational part
  logic [26:0] ext, shifted, lostmask;
  logic        sticky;
  always_comb begin
    ext      = {msml1, 3'b000};
    lostmask = '1;
    if (d1 >= 8'd27) begin
      shifted = '0;
      sticky  = |ext;
    end else begin
      shifted  = ext >> d1;
      lostmask = ~(27'h7FF_FFFF << d1);
      sticky   = |(ext & lostmask);
    end
  end

  // stage 4 leading-zero count of the 27-bit magnitude
  logic [4:0] lzc;
  always_comb begin
    lzc = 5'd27;
    for (int i = 0; i < 27; i++)
      if (sum3[i]) lzc = 5'(26 - i);
  end

  // stage 5 rounding, combinational part
  logic [24:0] rnd;
  logic        up;
  logic signed [9:0] e5;
  always_comb begin
    up  = n4[2] && ((|n4[1:0]) || n4[3]);
    rnd = {1'b0, n4[26:3]} + 25'(up);
    e5  = c4.exp;
    if (rnd[24]) e5 = c4.exp + 10'sd1;
  end

  always_ff @(posedge clk) begin
    // 1
    c1.sign      <= a_big ? a[31] : sb;
    c1.eff_sub   <= a[31] ^ sb;
    c1.nan       <= fp_is_special(a[30:23]) || fp_is_special(b[30:23]);
    c1.both_zero <= (ma == 24'd0) && (mb == 24'd0);
    c1.zsign     <= a[31] & sb;
    c1.exp       <= $signed({2'b0, (a_big ? ea : eb)});
    mbig1        <= a_big ? ma : mb;
    msml1        <= a_big ? mb : ma;
    d1           <= a_big ? (ea - eb) : (eb - ea);
    // 2
    c2   <= c1;
    big2 <= {mbig1, 3'b000};
    sml2 <= {shifted[26:1], shifted[0] | sticky};
    // 3
    c3   <= c2;
    sum3 <= c2.eff_sub ? ({1'b0, big2} - {1'b0, sml2}) : ({1'b0, big2} + {1'b0, sml2});
    // 4
    c4 <= c3;
    if (sum3[27]) begin
      n4     <= {sum3[27:2], sum3[1] | sum3[0]};
      c4.exp <= c3.exp + 10'sd1;
    end else begin
      n4     <= sum3[26:0] << lzc;
      c4.exp <= c3.exp - $signed({5'b0, lzc});
      if (sum3 == 28'd0) c4.both_zero <= 1'b1;
    end
    // 5
    if (c4.nan)                 y5 <= FP_QNAN;
    else if (c4.both_zero)      y5 <= {c4.zsign & ~c4.eff_sub, 31'd0};
    else if (e5 <= 10'sd0)      y5 <= {c4.sign, 31'd0};
    else if (e5 >= 10'sd255)    y5 <= fp_inf(c4.sign);
    else                        y5 <= {c4.sign, e5[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[3:0], in_valid};
  end

  assign out_valid = vld[4];
  assign y         = y5;

endmodule
