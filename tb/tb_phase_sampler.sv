// tb_phase_sampler - checks one phase driver: lane sampling, BE and trigger.
//
// The testbench drives hcnt itself, sweeping a full line 0..1400 with a new
// random 2-bit code every clock. It records the code present at each of the
// 50 sample times 100 + 8i (the first phase) and compares the lanes after the
// line. It also checks that be is high exactly at hcnt 492 and 493 and the
// trigger exactly at 98 and 99. A second instance set up as the fourth
// phase (base 106, trigger 1049) is checked the same way.
module tb_phase_sampler;
  logic                clk = 0, rst_n = 0;
  logic [10:0]         hcnt = 0;
  logic [1:0]          red = 0;
  logic [49:0][1:0]    lane0, lane3;
  logic                be0, sme0, be3, sme3;
  logic [1:0]          exp0 [50], exp3 [50];
  int checks = 0, failures = 0;

  phase_sampler dut0 (.clk(clk), .rst_n(rst_n), .hcnt(hcnt), .red(red),
                      .lane_code(lane0), .be(be0), .sme(sme0));
  phase_sampler #(.SAMPLE_BASE(106), .TRIG_START(1049)) dut3 (
                      .clk(clk), .rst_n(rst_n), .hcnt(hcnt), .red(red),
                      .lane_code(lane3), .be(be3), .sme(sme3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("%s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int line = 0; line < 3; line++) begin
      for (int unsigned h = 0; h <= 1400; h++) begin
        @(negedge clk);
        hcnt = 11'(h);
        red  = 2'($urandom);
        #1;
        for (int i = 0; i < 50; i++) begin
          if (h == 100 + 8 * i) exp0[i] = red;
          if (h == 106 + 8 * i) exp3[i] = red;
        end
        check("be0",  int'(be0),  int'(h == 492 || h == 493));
        check("sme0", int'(sme0), int'(h == 98  || h == 99));
        check("be3",  int'(be3),  int'(h == 498 || h == 499));
        check("sme3", int'(sme3), int'(h == 1049 || h == 1050));
      end
      @(negedge clk);
      for (int i = 0; i < 50; i++) begin
        check($sformatf("lane0[%0d]", i), int'(lane0[i]), int'(exp0[i]));
        check($sformatf("lane3[%0d]", i), int'(lane3[i]), int'(exp3[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
