// Pipelined single-precision floating-point divider, latency 27 cycles.
//
// y = a / b, rounded to nearest even. One division may enter every cycle; the
// result of operands sampled at clock edge n appears after edge n+27 with
// out_valid high. The latency of 27 cycles is the document's figure. The
// insides are this design's own: a radix-2 restoring divider unrolled into
// one stage per quotient bit. The quotient of the two 24-bit mantissas is
// formed as 26 bits, q = floor(ma * 2^25 / mb), which leaves 24 result bits
// plus a guard bit whichever of ma and mb is larger; the final remainder is
// the sticky bit. Stage 1 unpacks and forms the first quotient bit, stages
// 2-26 form one bit each, stage 27 normalises, rounds and packs. That is
// exactly 27 stages.
// Subnormals count as zero, x/0 gives infinity, 0/x gives zero, a NaN or
// infinity operand gives a quiet NaN. Only the valid bits are reset.
module fp_div
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

  localparam int unsigned QBITS = 26;              // quotient bits
  localparam int unsigned NST   = LAT_DIV;         // stages
  localparam int unsigned LAST  = QBITS - 1;       // stage index holding all bits

  typedef struct packed {
    logic               sign;
    logic               nan;
    logic               zero;    // dividend zero
    logic               dz;      // divisor zero
    logic signed [10:0] exp;     // ea - eb + 127
  } ctl_t;

  // Per-stage state of the bit-serial unrolled divider.
  ctl_t              c  [QBITS];
  logic [25:0]       rem[QBITS];   // partial remainder, always < 2*mb
  logic [23:0]       dvs[QBITS];   // divisor mantissa
  logic [QBITS-1:0]  q  [QBITS];   // quotient bits so far
  fp32_t             y_out;
  logic [NST-1:0]    vld;

  logic [23:0] ma0, mb0;
  assign ma0 = {1'b1, a[22:0]};
  assign mb0 = {1'b1, b[22:0]};

  // stage 1 (index 0): unpack and quotient bit 25
  always_ff @(posedge clk) begin
    c[0].sign <= a[31] ^ b[31];
    c[0].nan  <= fp_is_special(a[30:23]) || fp_is_special(b[30:23]);
    c[0].zero <= fp_is_zero(a[30:23]);
    c[0].dz   <= fp_is_zero(b[30:23]);
    c[0].exp  <= $signed({3'b0, a[30:23]}) - $signed({3'b0, b[30:23]}) + 11'sd127;
    dvs[0]    <= mb0;
    q[0]      <= '0;
    if (ma0 >= mb0) begin
      q[0][25] <= 1'b1;
      rem[0]   <= {1'b0, ma0 - mb0, 1'b0};
    end else begin
      rem[0]   <= {1'b0, ma0, 1'b0};
    end
  end

  // stages 2..26 (index 1..25): quotient bit 25-i
  for (genvar i = 1; i < QBITS; i++) begin : g_bit
    always_ff @(posedge clk) begin
      c[i]   <= c[i-1];
      dvs[i] <= dvs[i-1];
      q[i]   <= q[i-1];
      if (rem[i-1] >= {2'b00, dvs[i-1]}) begin
        q[i][QBITS-1-i] <= 1'b1;
        rem[i]          <= (rem[i-1] - {2'b00, dvs[i-1]}) << 1;
      end else begin
        rem[i]          <= rem[i-1] << 1;
      end
    end
  end

  // stage 27: normalise, round, pack
  ctl_t               cl;
  logic [25:0]        ql;
  logic [23:0]        m;
  logic               g, s, up;
  logic [24:0]        rnd;
  logic signed [10:0] e;
  always_comb begin
    cl = c[LAST];
    ql = q[LAST];
    if (ql[25]) begin
      m = ql[25:2];
      g = ql[1];
      s = ql[0] || (rem[LAST] != '0);
      e = cl.exp;
    end else begin
      m = ql[24:1];
      g = ql[0];
      s = rem[LAST] != '0;
      e = cl.exp - 11'sd1;
    end
    up  = g && (s || m[0]);
    rnd = {1'b0, m} + 25'(up);
    if (rnd[24]) e = e + 11'sd1;
  end

  always_ff @(posedge clk) begin
    if (cl.nan)                 y_out <= FP_QNAN;
    else if (cl.dz)             y_out <= fp_inf(cl.sign);
    else if (cl.zero)           y_out <= {cl.sign, 31'd0};
    else if (e <= 11'sd0)       y_out <= {cl.sign, 31'd0};
    else if (e >= 11'sd255)     y_out <= fp_inf(cl.sign);
    else                        y_out <= {cl.sign, e[7:0], rnd[24] ? rnd[23:1] : rnd[22:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[NST-2:0], in_valid};
  end

  assign out_valid = vld[NST-1];
  assign y         = y_out;

endmodule
