// Self-checking testbench of solver_core.
//
// Streams random positive reactions into the core, back to back (one every
// two cycles) and with random gaps, and compares each v bit for bit with the
// data-flow graph evaluated in the same operation order with correctly
// rounded single-precision reference arithmetic. Checks the 81-cycle latency
// and that a back-to-back stream produces one result every two cycles.
module tb_solver_core;
  import recsip_pkg::*;
  import fp_ref_pkg::*;

  localparam int LATENCY = 81;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t x = '0, k1 = '0, k2 = '0;
  logic  state, v_valid;
  fp32_t v;
  int    checks = 0, failures = 0, n_out = 0;
  longint cyc = 0, first_out = -1, last_out = -1;
  fp32_t  exp_q[$];
  fp32_t  last_v = '0;
  longint t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  solver_core dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
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

  // Present one reaction; waits for state 0.
  task automatic react(fp32_t xa, fp32_t xb, fp32_t ka, fp32_t kb, fp32_t kc);
    @(negedge clk);
    while (state != 1'b0) begin
      in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b1; x = xa; k1 = kb; k2 = ka;
    exp_q.push_back(ref_v(xa, xb, ka, kb, kc));
    t_q.push_back(cyc);
    @(negedge clk);
    x = xb; k1 = kc; k2 = $urandom;
  endtask

  always @(negedge clk) begin
    if (v_valid) begin
      fp32_t  e;
      longint t;
      n_out++;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      last_v   = v;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        checks += 2;
        if (v !== e) begin
          failures++;
          if (failures < 10) $display("v mismatch: got %h expected %h", v, e);
        end
        if (cyc - t != LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - t, LATENCY);
        end
      end
    end
  end

  localparam int NB = 400;   // back-to-back burst

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // a hand-checkable case: Xa=2, Xb=4, Ka=3, Kb=1, Kc=2:
    // (3*2)/(2/1) = 3, 1 + 2 + 0.5 = 3.5, v = 3/3.5
    react(32'h4000_0000, 32'h4080_0000, 32'h4040_0000, 32'h3F80_0000, 32'h4000_0000);
    @(negedge clk) in_valid = 1'b0;
    repeat (100) @(negedge clk);
    checks++;
    if (n_out != 1 || last_v !== ref_div(32'h4040_0000, 32'h4060_0000)) begin
      failures++;
      $display("hand case failed: %h", last_v);
    end
    // back-to-back burst: one reaction every two cycles
    n_out = 0; first_out = -1;
    for (int i = 0; i < NB; i++)
      react(rand_pos(110, 140), rand_pos(110, 140), rand_pos(110, 140),
            rand_pos(110, 140), rand_pos(110, 140));
    @(negedge clk) in_valid = 1'b0;
    repeat (LATENCY + 10) @(negedge clk);
    checks++;
    if (n_out != NB || last_out - first_out != 2 * (NB - 1)) begin
      failures++;
      $display("burst throughput: %0d results over %0d cycles", n_out, last_out - first_out);
    end
    // random gaps
    for (int i = 0; i < 600; i++) begin
      react(rand_pos(90, 160), rand_pos(90, 160), rand_pos(90, 160),
            rand_pos(90, 160), rand_pos(90, 160));
      if ($urandom % 3 == 0) begin
        @(negedge clk) in_valid = 1'b0;
        repeat ($urandom % 5) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LATENCY + 10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
