// Shared types and constants of the rate-law solver.
//
// Numbers are IEEE-754 single precision (binary32), the format the solver's
// arithmetic uses. The unit latencies 5 (add-subtractor), 5 (multiplier) and
// 27 (divider) cycles are the figures given for the original implementation;
// every schedule in the Solver Core is built from them. The special-value
// policy (flush subnormals to zero, one canonical NaN) is this design's own.
package recsip_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_fields_t;

  localparam int unsigned LAT_ADD = 5;
  localparam int unsigned LAT_MUL = 5;
  localparam int unsigned LAT_DIV = 27;

  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  // Pipeline pitch of the Solver Core: two concentrations share the
  // single X port, so one reaction takes two input cycles.
  localparam int unsigned PITCH = 2;

  // Both tests look only at the biased exponent field, f[30:23].
  function automatic logic fp_is_zero(logic [7:0] e);
    return e == 8'd0;                   // zero or subnormal (flushed)
  endfunction

  function automatic logic fp_is_special(logic [7:0] e);
    return e == 8'hFF;                  // infinity or NaN
  endfunction

  function automatic fp32_t fp_inf(logic s);
    return {s, 8'hFF, 23'd0};
  endfunction

endpackage
