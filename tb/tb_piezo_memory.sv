// tb_piezo_memory - checks the staircase code held between triggers.
//
// Triggers T1..T4 are pulsed in line order and also in random order with
// random gaps. After each trigger the step code must be its index (0..3)
// and the one-hot phase must name it, and both must hold through the gap.
module tb_piezo_memory;
  logic       clk = 0, rst_n = 0;
  logic [3:0] sme = 0, phase;
  logic [1:0] step;
  int checks = 0, failures = 0;
  int unsigned expect_step = 0;
  int seen [4];

  piezo_memory dut (.clk(clk), .rst_n(rst_n), .sme(sme), .step(step), .phase(phase));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(int unsigned p, int unsigned gap);
    @(negedge clk); sme = 4'b1 << p;
    @(negedge clk); sme = 4'b1 << p;
    expect_step = p;
    seen[p]++;
    @(negedge clk); sme = '0;
    for (int k = 0; k < gap; k++) begin
      checks += 2;
      if (step != 2'(expect_step)) begin failures++; $display("step %0d want %0d", step, expect_step); end
      if (phase != (4'b1 << expect_step)) failures++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    checks++;
    if (step != 0) failures++;          // reset value
    for (int line = 0; line < 5; line++)
      for (int p = 0; p < 4; p++) pulse(p, 315);
    for (int n = 0; n < 50; n++) pulse($urandom_range(0, 3), $urandom_range(1, 40));
    for (int p = 0; p < 4; p++) begin checks++; if (seen[p] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
