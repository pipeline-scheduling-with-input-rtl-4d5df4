// Self-checking testbench of fp_add: random and directed additions and
// subtractions, one per cycle, compared bit for bit with double-precision
// reference arithmetic rounded to single; the latency must be 5 cycles.
module tb_fp_add;
  import recsip_pkg::*;
  import fp_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, sub = 1'b0;
  fp32_t a = '0, b = '0;
  logic  out_valid;
  fp32_t y;
  int    checks = 0, failures = 0;
  longint cyc = 0;
  fp32_t  exp_q[$];
  longint t_q[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fp_add dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(fp32_t x, fp32_t z, logic s);
    @(negedge clk);
    a = x; b = z; sub = s; in_valid = 1'b1;
    exp_q.push_back(s ? ref_sub(x, z) : ref_add(x, z));
    t_q.push_back(cyc);
  endtask

  always @(negedge clk) begin
    if (out_valid) begin
      fp32_t  e;
      longint t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks += 2;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h expected %h", y, e);
      end
      if (cyc - t != LAT_ADD) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t, LAT_ADD);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed: exact cancellation, carry-out, large exponent gaps, ties
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b1);
    issue(32'h3F80_0000, 32'h3F80_0000, 1'b0);
    issue(32'h3FFF_FFFF, 32'h3400_0000, 1'b0);
    issue(32'h4B80_0000, 32'h3F80_0000, 1'b0);
    issue(32'h3F80_0001, 32'h3F80_0000, 1'b1);
    issue(32'h5000_0000, 32'h3000_0000, 1'b1);
    issue(32'h0000_0000, 32'h4040_0000, 1'b0);
    issue(32'h4040_0000, 32'h0000_0000, 1'b1);
    issue(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);
    for (int i = 0; i < 6000; i++) begin
      if (i % 3 == 0) issue(rand_fp(120, 134), rand_fp(120, 134), 1'($urandom));
      else if (i % 3 == 1) begin
        // nearly equal magnitudes: deep cancellation
        fp32_t x;
        x = rand_fp(100, 150);
        issue(x, x ^ 32'($urandom % 256), 1'($urandom));
      end
      else issue(rand_fp(60, 190), rand_fp(60, 190), 1'($urandom));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (20) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
