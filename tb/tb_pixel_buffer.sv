// tb_pixel_buffer - checks that the line buffer loads only while be is high.
//
// Random codes are presented every clock and be is raised at random; a
// reference copy is updated on the same edges, and the buffer output must
// equal it after every clock.
module tb_pixel_buffer;
  logic             clk = 0, rst_n = 0, be = 0;
  logic [49:0][1:0] din = '0, dout, ref_q;
  int checks = 0, failures = 0, loads = 0;

  pixel_buffer dut (.clk(clk), .rst_n(rst_n), .be(be), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 50; i++) din[i] = 2'($urandom);
      be = ($urandom_range(0, 7) == 0);
      @(posedge clk);
      if (be) begin ref_q = din; loads++; end
      #1;
      checks++;
      if (dout != ref_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d: buffer differs from reference", n);
      end
    end
    checks++;
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
