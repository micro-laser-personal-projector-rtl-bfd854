// tb_laser_fsm - checks the on-time of one laser for each brightness code.
//
// The testbench plays the actuator: every 317 clocks it pulses load for one
// clock with a random code and restarts its own counter acnt at that edge.
// It then counts the clocks the laser is on and checks that the laser comes
// on the clock after load and stays on exactly 314, 157, 79 or 0 clocks for
// codes 11, 10, 01, 00. A load arriving while a laser is still lit must
// replace the state at once (checked by an early load).
module tb_laser_fsm;
  logic       clk = 0, rst_n = 0, load = 0, led;
  logic [1:0] code = 0;
  logic [8:0] acnt = 0;
  int checks = 0, failures = 0;
  int seen [4];

  laser_fsm dut (.clk(clk), .rst_n(rst_n), .load(load), .code(code), .acnt(acnt), .led(led));

  always #5 clk = ~clk;

  always_ff @(posedge clk) acnt <= load ? 9'd0 : acnt + 9'd1;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int want_on(logic [1:0] c);
    case (c)
      2'b11: return 314;
      2'b10: return 157;
      2'b01: return 79;
      default: return 0;
    endcase
  endfunction

  task automatic slot(logic [1:0] c, int len);
    int on_cnt = 0, first_on = -1, w;
    @(negedge clk);
    code = c; load = 1;
    @(negedge clk);
    load = 0; code = 2'($urandom);
    for (int k = 0; k < len - 1; k++) begin
      if (led) begin
        if (first_on < 0) first_on = k;
        on_cnt++;
      end
      @(negedge clk);
    end
    w = (len - 1 < want_on(c)) ? len - 1 : want_on(c);
    checks++;
    if (on_cnt != w) begin
      failures++;
      $display("code %b: on %0d clocks, want %0d", c, on_cnt, w);
    end
    if (w > 0) begin
      checks++;
      if (first_on != 0) begin failures++; $display("code %b: late start %0d", c, first_on); end
    end
    seen[c]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 4; c++) slot(2'(c), 317);
    for (int n = 0; n < 60; n++) slot(2'($urandom), 317);
    slot(2'b11, 100);   // cut short by the next load
    slot(2'b00, 317);   // code 00 turns the laser off at once
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (seen[c] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
