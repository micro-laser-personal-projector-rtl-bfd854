// tb_line_counter - checks the H-sync line counter against a reference count.
//
// H-sync is held high for lines of different lengths, some longer than the
// 1401-clock roll-over period, with low gaps between them. The reference is
// the number of clocks since H-sync rose, modulo 1401; it must be zero
// whenever H-sync has been low.
module tb_line_counter;
  logic        clk = 0, rst_n = 0, hsync = 0;
  logic [10:0] hcnt;
  int checks = 0, failures = 0;
  int unsigned ref_cnt = 0;

  line_counter dut (.clk(clk), .rst_n(rst_n), .hsync(hsync), .hcnt(hcnt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_line(int unsigned high, int unsigned low);
    for (int unsigned k = 0; k < high + low; k++) begin
      hsync <= (k < high);
      @(posedge clk);
      // reference model: clear while low, count while high, roll over after 1400
      if (!hsync) ref_cnt = 0;
      else        ref_cnt = (ref_cnt < 1400) ? ref_cnt + 1 : 0;
      #1;
      checks++;
      if (hcnt != 11'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("mismatch hcnt=%0d ref=%0d", hcnt, ref_cnt);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_line(1380, 182);
    run_line(1450, 112);   // passes the roll-over point
    run_line(3000, 50);    // rolls over twice
    run_line(10, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
