// Solver Core for the rate law
//
//   v = (Ka * Xa / (Xa / Kb)) / (1 + Xa / Kb + Kc / Xb)
//
// A statically scheduled single-precision pipeline with one X port for
// concentrations and two k ports for rate coefficients. Both concentrations
// must pass the single X port, so one reaction takes two input cycles: the
// pipeline pitch is P = 2 and a free-running state counter (0, 1) tells the
// shared units which operation they perform.
//
// Input order, chosen with the document's input-priority rules (number of
// successors first, then the number of divider subtrees covering an input,
// then usage frequency); Ka before Kc breaks a tie and is this design's own:
//   state 0: x = Xa, k1 = Kb, k2 = Ka
//   state 1: x = Xb, k1 = Kc, k2 unused
//
// Schedule, t = cycle in which state 0 of a reaction is presented (unit
// latencies 5 add, 5 mul, 27 div):
//   op1 mul Ka*Xa         t+0  -> t+5   multiplier
//   op2 div Xa/Kb         t+0  -> t+27  divider A, state 0
//   op5 div Kc/Xb         t+1  -> t+28  divider A, state 1
//   op3 div op1/op2       t+27 -> t+54  divider B, state 1
//   op4 add 1+op2         t+27 -> t+32  adder,     state 1
//   op6 add op4+op5       t+32 -> t+37  adder,     state 0
//   op7 div op3/op6       t+54 -> t+81  divider B, state 0
// Seven operations run on two dividers, one adder and one multiplier; op1,
// op5 and op6 wait in delay lines of 22, 4 and 17 cycles for their partner.
// The schedule is derived here by hand with list scheduling; the document
// gives the data-flow graph and the method, not this table.
//
// Interface: in_valid must be high in both states of a reaction, starting in
// state 0 (state is an output so the feeder can align). v is valid LATENCY =
// 81 cycles after the state-0 cycle, one result every 2 cycles at most.
// There is no back-pressure.
module solver_core
  import recsip_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t x,
  input  fp32_t k1,
  input  fp32_t k2,
  output logic  state,
  output logic  v_valid,
  output fp32_t v
);

  localparam int unsigned P         = 2;
  localparam int unsigned LATENCY   = 3 * LAT_DIV;                // 81: three chained divisions
  localparam int unsigned D_MUL     = LAT_DIV - LAT_MUL;          // 22
  localparam int unsigned D_KCXB    = LAT_ADD - 1;                // 4
  localparam int unsigned D_DEN     = LAT_DIV - 2 * LAT_ADD;      // 17

  pitch_counter #(.P(P)) u_state (.clk, .rst_n, .state(state));

  // multiplier: op1
  logic  mul_v;
  fp32_t mul_y;
  fp_mul u_mul (.clk, .rst_n, .in_valid(in_valid && !state), .a(k2), .b(x),
                .out_valid(mul_v), .y(mul_y));

  // divider A: op2 (state 0), op5 (state 1)
  logic  da_v;
  fp32_t da_y, da_a, da_b;
  always_comb begin
    if (!state) begin da_a = x;  da_b = k1; end   // Xa / Kb
    else        begin da_a = k1; da_b = x;  end   // Kc / Xb
  end
  fp_div u_div_a (.clk, .rst_n, .in_valid(in_valid), .a(da_a), .b(da_b),
                  .out_valid(da_v), .y(da_y));

  // delay lines
  fp32_t mul_d, kcxb_d, den_d;
  delay_line #(.W(32), .D(D_MUL))  u_dl_mul  (.clk, .d(mul_y), .q(mul_d));
  delay_line #(.W(32), .D(D_KCXB)) u_dl_kcxb (.clk, .d(da_y),  .q(kcxb_d));

  // adder: op4 (state 1), op6 (state 0)
  logic  ad_v, ad_in_v;
  fp32_t ad_y, ad_a, ad_b;
  always_comb begin
    if (state) begin ad_a = FP_ONE; ad_b = da_y;   ad_in_v = da_v; end  // 1 + Xa/Kb
    else       begin ad_a = ad_y;   ad_b = kcxb_d; ad_in_v = ad_v; end  // + Kc/Xb
  end
  fp_add u_add (.clk, .rst_n, .in_valid(ad_in_v), .sub(1'b0), .a(ad_a), .b(ad_b),
                .out_valid(ad_v), .y(ad_y));

  delay_line #(.W(32), .D(D_DEN)) u_dl_den (.clk, .d(ad_y), .q(den_d));

  // divider B: op3 (state 1), op7 (state 0)
  logic  db_v, db_in_v;
  fp32_t db_y, db_a, db_b;
  always_comb begin
    if (state) begin db_a = mul_d; db_b = da_y;  db_in_v = da_v; end  // Ka*Xa / (Xa/Kb)
    else       begin db_a = db_y;  db_b = den_d; db_in_v = db_v; end  // numerator / denominator
  end
  fp_div u_div_b (.clk, .rst_n, .in_valid(db_in_v), .a(db_a), .b(db_b),
                  .out_valid(db_v), .y(db_y));

  // op7 results leave divider B in state 1
  assign v_valid = db_v && state;
  assign v       = db_y;

  // A reaction occupies both states: state 1 must repeat state 0's in_valid.
  logic in_valid_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_valid_q <= 1'b0;
    else        in_valid_q <= in_valid;
  end
  a_pair : assert property (@(posedge clk) disable iff (!rst_n)
                            state |-> (in_valid == in_valid_q))
    else $error("solver_core: in_valid must cover both states of a reaction");

  // op1 products appear in state 1 only (t+5).
  a_mul : assert property (@(posedge clk) disable iff (!rst_n) mul_v |-> state)
    else $error("solver_core: multiplier result out of schedule");

  // The operand timing above relies on the odd unit latencies (5, 5, 27).
  if (LATENCY != 81 || (LAT_DIV % 2) != 1 || (LAT_ADD % 2) != 1) begin : g_lat_check
    $error("solver_core schedule assumes latencies 5/5/27");
  end

endmodule
