// tb_motor_sync_divider - checks the 96 % duty V-sync becomes 50 % duty.
//
// V-sync is generated with a period of P clocks, low for 4 % of it. Over each
// period after the first two the motor signal must be high for P/2 clocks
// (rounded down), starting the clock after V-sync rises, and must have the
// same period. Two periods are tried, one of them a 60 Hz frame at
// 50 MHz (833,333 clocks); the circuit must then retune to the new period.
module tb_motor_sync_divider;
  logic clk = 0, rst_n = 0, vsync = 1, motor_ctrl;
  int checks = 0, failures = 0;
  localparam int unsigned PERIODS [2] = '{1000, 833333};

  motor_sync_divider dut (.clk(clk), .rst_n(rst_n), .vsync(vsync), .motor_ctrl(motor_ctrl));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one V-sync period: low for 4 %, then high; returns the high-clock count
  // of motor_ctrl and the offset of its first high clock from the V-sync rise
  task automatic frame(int unsigned period, output int unsigned hi, output int first_hi);
    int unsigned low_len = period * 4 / 100;
    hi = 0; first_hi = -1;
    for (int unsigned k = 0; k < period; k++) begin
      @(negedge clk);
      vsync = (k >= low_len);
      if (motor_ctrl) begin
        hi++;
      end
      // k - low_len clocks after V-sync was set high
      if (motor_ctrl && first_hi < 0 && k >= low_len) first_hi = int'(k - low_len);
    end
  endtask

  initial begin
    int unsigned hi;
    int first_hi;

    repeat (2) @(posedge clk);
    rst_n <= 1;
    foreach (PERIODS[j]) begin
      for (int f = 0; f < 4; f++) begin
        frame(PERIODS[j], hi, first_hi);
        if (f >= 2) begin
          checks += 2;
          if (hi != PERIODS[j] / 2) begin
            failures++;
            $display("period %0d: high %0d clocks, want %0d", PERIODS[j], hi, PERIODS[j] / 2);
          end
          if (first_hi != 1) begin
            failures++;
            $display("period %0d: rises %0d clocks after V-sync", PERIODS[j], first_hi);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
