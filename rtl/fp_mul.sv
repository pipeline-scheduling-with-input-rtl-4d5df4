// Pipelined single-precision floating-point multiplier, latency 5 cycles.
//
// y = a * b, rounded to nearest even. A new operation may enter every cycle;
// the result of the operands sampled at clock edge n appears after edge n+5
// with out_valid high. The latency of 5 is the document's figure; the split
// into stages is this design's own:
//   1 unpack, sign and biased exponent sum, special-value detection
//   2 24x24-bit mantissa product
//   3 normalise to 1.xxx with guard and sticky bits
//   4 round to nearest even
//   5 range check and pack (underflow flushes to zero, overflow gives inf)
// Subnormal inputs count as zero; a NaN or infinity input gives a quiet NaN.
// Only the valid bits are reset; the data pipeline is a plain shift pipeline.
module fp_mul
  import recsip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  typedef struct packed {
    logic              sign;
    logic              zero;
    logic              nan;
    logic signed [10:0] exp;   // biased exponent of the result before normalising
  } ctl_t;

  // stage 1
  ctl_t        c1;
  logic [23:0] ma1, mb1;
  // stage 2
  ctl_t        c2;
  logic [47:0] prod2;
  // stage 3
  ctl_t        c3;
  logic [23:0] m3;
  logic        g3, s3;
  // stage 4
  ctl_t        c4;
  logic [22:0] m4;     // fraction; the hidden one is implied
  // stage 5
  fp32_t       y5;
  logic [4:0]  vld;

  always_ff @(posedge clk) begin
    // 1: unpack
    c1.sign <= a[31] ^ b[31];
    c1.zero <= fp_is_zero(a[30:23]) || fp_is_zero(b[30:23]);
    c1.nan  <= fp_is_special(a[30:23]) || fp_is_special(b[30:23]);
    c1.exp  <= $signed({3'b0, a[30:23]}) + $signed({3'b0, b[30:23]}) - 11'sd127;
    ma1     <= {1'b1, a[22:0]};
    mb1     <= {1'b1, b[22:0]};
    // 2: multiply
    c2      <= c1;
    prod2   <= ma1 * mb1;
    // 3: normalise, product lies in [1,4)
    c3 <= c2;
    if (prod2[47]) begin
      m3     <= prod2[47:24];
      g3     <= prod2[23];
      s3     <= |prod2[22:0];
      c3.exp <= c2.exp + 11'sd1;
    end else begin
      m3     <= prod2[46:23];
      g3     <= prod2[22];
      s3     <= |prod2[21:0];
    end
    // 4: round to nearest, ties to even
    c4 <= c3;
    if (g3 && (s3 || m3[0])) begin
      if (m3 == 24'hFF_FFFF) begin
        m4     <= 23'd0;
        c4.exp <= c3.exp + 11'sd1;
      end else begin
        m4 <= m3[22:0] + 23'd1;
      end
    end else begin
      m4 <= m3[22:0];
    end
    // 5: pack
    if (c4.nan)                   y5 <= FP_QNAN;
    else if (c4.zero)             y5 <= {c4.sign, 31'd0};
    else if (c4.exp <= 11'sd0)    y5 <= {c4.sign, 31'd0};
    else if (c4.exp >= 11'sd255)  y5 <= fp_inf(c4.sign);
    else                          y5 <= {c4.sign, c4.exp[7:0], m4};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[3:0], in_valid};
  end

  assign out_valid = vld[4];
  assign y         = y5;

endmodule
