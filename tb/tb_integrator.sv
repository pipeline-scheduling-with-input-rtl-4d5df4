// Testbench of the integrator, attached to a Solver Core, at
// small memory sizes (8 species, 4 reactions, 8 updates). Also checks the
// length of a run against 2*n_react + 85 + 12*n_upd cycles per step.
//
// Loads a random network through the host ports, runs several
// explicit-Euler time steps and compares every concentration, bit for bit,
// with a model that evaluates the same rate law and updates in the same
// order with correctly rounded single-precision arithmetic. A second run
// restarts the integrator from the integrated state. It also counts the
// mechanisms the run must exercise: both input states of the core,
// back-to-back reactions at a pitch of two cycles, positive and negative
// updates (counted in the model), several steps per run, and host read-back.
module tb_integrator;
  import recsip_pkg::*;
  import fp_ref_pkg::*;

  localparam int NX = 8, NR = 4, NU = 8;
  localparam int XW = $clog2(NX), RW = $clog2(NR), KW = $clog2(NR * PITCH), UW = $clog2(NU);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          host_x_we = 1'b0, host_k_we = 1'b0, host_rt_we = 1'b0, host_u_we = 1'b0;
  logic [XW-1:0] host_x_addr = '0, host_rt_wdata = '0, host_u_i = '0;
  fp32_t         host_x_wdata = '0, host_k1_wdata = '0, host_k2_wdata = '0, host_x_rdata;
  logic [KW-1:0] host_k_addr = '0, host_rt_addr = '0;
  logic [UW-1:0] host_u_addr = '0;
  logic          host_u_neg = 1'b0;
  logic [RW-1:0] host_u_r = '0;
  logic          start = 1'b0;
  logic [RW:0]   n_react = '0;
  logic [UW:0]   n_upd = '0;
  logic [15:0]   n_steps = '0;
  fp32_t         dt = 32'h3C00_0000;   // 2^-7
  logic          busy, done;
  logic [15:0]   step_cnt;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic  core_in_valid, core_state, core_v_valid;
  fp32_t core_x, core_k1, core_k2, core_v;

  integrator #(.N_X(NX), .N_R(NR), .N_U(NU)) dut (.*);
  solver_core u_core (.clk, .rst_n, .in_valid(core_in_valid), .x(core_x), .k1(core_k1),
                      .k2(core_k2), .state(core_state), .v_valid(core_v_valid), .v(core_v));

  // model state
  fp32_t mx [NX];
  fp32_t mk1[NR*PITCH], mk2[NR*PITCH];
  int    mrt[NR*PITCH];
  int    mur[NU], mui[NU];
  bit    mun[NU];
  fp32_t mv [NR];

  // mechanism counters
  int n_div_s0 = 0, n_div_s1 = 0, n_b2b = 0, n_v = 0, n_pos = 0, n_neg = 0, n_multi = 0, n_read = 0;
  longint cyc = 0, last_v = -10, t_start = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (core_in_valid) begin
        if (core_state) n_div_s1++; else n_div_s0++;
      end
      if (core_v_valid) begin
        n_v++;
        if (cyc - last_v == PITCH) n_b2b++;
        last_v = cyc;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t ref_v(fp32_t xa, fp32_t xb, fp32_t ka, fp32_t kb, fp32_t kc);
    fp32_t o1, o2, o3, o4, o5, o6;
    o1 = ref_mul(ka, xa);
    o2 = ref_div(xa, kb);
    o3 = ref_div(o1, o2);
    o4 = ref_add(FP_ONE, o2);
    o5 = ref_div(kc, xb);
    o6 = ref_add(o4, o5);
    return ref_div(o3, o6);
  endfunction

  task automatic model_step(int nr, int nu);
    for (int r = 0; r < nr; r++)
      mv[r] = ref_v(mx[mrt[2*r]], mx[mrt[2*r+1]], mk2[2*r], mk1[2*r], mk1[2*r+1]);
    for (int u = 0; u < nu; u++) begin
      fp32_t p;
      if (mun[u]) n_neg++; else n_pos++;
      p = ref_mul(dt, mv[mur[u]]);
      mx[mui[u]] = mun[u] ? ref_sub(mx[mui[u]], p) : ref_add(mx[mui[u]], p);
    end
  endtask

  task automatic load();
    for (int i = 0; i < NX; i++) begin
      mx[i] = rand_pos(125, 128);
      @(negedge clk);
      host_x_we = 1'b1; host_x_addr = XW'(i); host_x_wdata = mx[i];
    end
    for (int j = 0; j < NR * PITCH; j++) begin
      mk1[j] = rand_pos(124, 129);
      mk2[j] = rand_pos(124, 129);
      mrt[j] = $urandom % NX;
      @(negedge clk);
      host_x_we = 1'b0;
      host_k_we = 1'b1; host_k_addr = KW'(j); host_k1_wdata = mk1[j]; host_k2_wdata = mk2[j];
      host_rt_we = 1'b1; host_rt_addr = KW'(j); host_rt_wdata = XW'(mrt[j]);
    end
    for (int u = 0; u < NU; u++) begin
      mur[u] = $urandom % NR;
      mui[u] = $urandom % NX;
      mun[u] = 1'($urandom);
      @(negedge clk);
      host_k_we = 1'b0; host_rt_we = 1'b0;
      host_u_we = 1'b1; host_u_addr = UW'(u); host_u_r = RW'(mur[u]);
      host_u_i = XW'(mui[u]); host_u_neg = mun[u];
    end
    @(negedge clk);
    host_u_we = 1'b0;
  endtask

  task automatic run(int nr, int nu, int steps);
    @(negedge clk);
    n_react = (RW+1)'(nr); n_upd = (UW+1)'(nu); n_steps = 16'(steps);
    start = 1'b1;
    t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    // step time: 2 cycles per reaction, 85 to drain the core, 12 per update;
    // the first read waits up to one cycle for the core's state 0
    checks++;
    if (cyc - t_start > longint'(steps * (2 * nr + 85 + 12 * nu)) ||
        cyc - t_start < longint'(steps * (2 * nr + 84 + 12 * nu))) begin
      failures++;
      $display("run took %0d cycles, expected about %0d", cyc - t_start, steps * (2 * nr + 85 + 12 * nu));
    end
    checks++;
    if (step_cnt != 16'(steps)) begin
      failures++;
      $display("step count %0d, expected %0d", step_cnt, steps);
    end
    if (steps > 1) n_multi++;
    for (int s = 0; s < steps; s++) model_step(nr, nu);
  endtask

  task automatic compare_all();
    for (int i = 0; i < NX; i++) begin
      @(negedge clk);
      host_x_addr = XW'(i);
      @(negedge clk);
      n_read++;
      checks++;
      if (host_x_rdata !== mx[i]) begin
        failures++;
        if (failures < 10) $display("X[%0d] = %h, expected %h", i, host_x_rdata, mx[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load();
    compare_all();            // host write / read-back
    run(NR, NU, 3);
    compare_all();
    run(NR / 2 + 1, NU / 2, 1);   // partial tables, restart from integrated state
    compare_all();
    run(1, 0, 2);                 // no updates: concentrations must not change
    compare_all();
    // every mechanism must have happened
    checks++;
    if (n_div_s0 == 0 || n_div_s1 == 0 || n_b2b == 0 || n_pos == 0 || n_neg == 0 ||
        n_multi == 0 || n_read == 0 || n_v != 3 * NR + NR / 2 + 1 + 2) begin
      failures++;
      $display("mechanism missing: div s0 %0d s1 %0d, back-to-back %0d, pos %0d neg %0d, multi %0d, reads %0d, rates %0d",
               n_div_s0, n_div_s1, n_b2b, n_pos, n_neg, n_multi, n_read, n_v);
    end
    $display("divider A state0 %0d state1 %0d, back-to-back rates %0d of %0d, updates +%0d -%0d, multi-step runs %0d, reads %0d",
             n_div_s0, n_div_s1, n_b2b, n_v, n_pos, n_neg, n_multi, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
