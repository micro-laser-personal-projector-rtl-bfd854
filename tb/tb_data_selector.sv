// tb_data_selector - feeds whole scan lines and checks the four phases.
//
// Each line carries 200 random pixels, pixel k (1..200) present for the two
// clocks at which the line counter reads 100 + 2(k-1) and 101 + 2(k-1).
// After the line, lane i of phase p must hold pixel 4i + p + 1. The buffer
// enables and triggers T1..T4 are checked against the times 492+2p and
// 98 + 317p (two clocks each), counted from the rise of H-sync.
module tb_data_selector;
  logic                    clk = 0, rst_n = 0, hsync = 0;
  logic [1:0]              red = 0;
  logic [3:0][49:0][1:0]   lane;
  logic [3:0]              be, sme;
  logic [10:0]             hcnt;
  logic [1:0]              pix [1:200];
  int checks = 0, failures = 0;

  data_selector dut (.clk(clk), .rst_n(rst_n), .hsync(hsync), .red(red),
                     .lane_code(lane), .be(be), .sme(sme), .hcnt(hcnt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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
    for (int line = 0; line < 4; line++) begin
      foreach (pix[k]) pix[k] = 2'($urandom);
      // t counts clocks since H-sync was first sampled high; the counter
      // reads t during clock t.
      for (int t = 0; t < 1562; t++) begin
        @(negedge clk);
        hsync = (t < 1381);
        red   = (t >= 100 && t < 500) ? pix[(t - 100) / 2 + 1] : 2'(t);
        if (t <= 1380) begin
          #1;
          for (int p = 0; p < 4; p++) begin
            check("be",  int'(be[p]),  int'(t == 492 + 2 * p || t == 493 + 2 * p));
            check("sme", int'(sme[p]), int'(t == 98 + 317 * p || t == 99 + 317 * p));
          end
        end
        if (t == 600)
          for (int p = 0; p < 4; p++)
            for (int i = 0; i < 50; i++)
              check($sformatf("lane[%0d][%0d]", p, i), int'(lane[p][i]), int'(pix[4 * i + p + 1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
