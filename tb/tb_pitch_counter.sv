// Self-checking testbench of pitch_counter: after reset the state must count
// 0, 1, ..., P-1, 0, ... every cycle, checked for pitch 2 and pitch 3
// against a counter kept in the testbench, including a reset in mid-count.
module tb_pitch_counter;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       s2;
  logic [1:0] s3;
  int         checks = 0, failures = 0;
  int         m2 = 0, m3 = 0;

  always #5 clk = ~clk;

  pitch_counter #(.P(2)) dut2 (.clk, .rst_n, .state(s2));
  pitch_counter #(.P(3)) dut3 (.clk, .rst_n, .state(s3));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      checks += 2;
      if (s2 != 1'(m2)) begin failures++; $display("P=2: %0d, expected %0d", s2, m2); end
      if (s3 != 2'(m3)) begin failures++; $display("P=3: %0d, expected %0d", s3, m3); end
      m2 = (m2 + 1) % 2;
      m3 = (m3 + 1) % 3;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks += 2;
    if (s2 != 0 || s3 != 0) failures++;
    rst_n = 1'b1;
    @(posedge clk);
    m2 = 1; m3 = 1;
    run(50);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    m2 = 0; m3 = 0;
    @(posedge clk);
    m2 = 1; m3 = 1;
    run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
