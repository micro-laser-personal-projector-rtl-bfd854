// tb_mlpp_sync_window - end-to-end test at the edges of the input timing.
//
// The main driver times everything from the rise of H-sync, so it accepts a
// range of line timings: H-sync must stay high for at least 1049 clocks, so
// that the line counter reaches 1049 (the first clock of the last trigger),
// and for at most 1498 clocks (after that the counter wraps at 1400 and fires
// the first trigger again). A line must last at least 1265 clocks, so that
// the last phase's longest pulse (lit through counter value 1363) ends before
// the next line's first pulse begins, 99 clocks after the next H-sync rise. This testbench draws every line's H-sync high time at random
// from 1049..1498 clocks and its length from the shortest allowed up to
// 1600 clocks (H-sync low for as little as one clock), including lines at
// exactly those limits. Pixels are random 2-bit codes.
//
// Every clock, every laser is compared with the expected picture: laser i
// in phase p shows pixel 4i+p+1, lit from 99+317p clocks after H-sync rose
// for 314/157/79/0 clocks, the first two phases from the previous line and
// the last two from the current one. The pulses run on after H-sync falls.
// Lines at each limit are counted and must occur.
module tb_mlpp_sync_window;
  localparam int LINES = 400;

  logic        clk = 0, rst_n = 0, hsync = 0, vsync = 1;
  logic [1:0]  red = 0;
  logic [49:0] laser;
  logic [1:0]  piezo_step, red_out;
  logic [3:0]  piezo_phase, sme;
  logic        motor_ctrl, hsync_out, vsync_out;
  logic [10:0] hcnt;

  mlpp_top dut (
    .clk(clk), .rst_n(rst_n), .hsync(hsync), .vsync(vsync), .red(red),
    .laser(laser), .piezo_step(piezo_step), .piezo_phase(piezo_phase),
    .motor_ctrl(motor_ctrl), .sme(sme), .hsync_out(hsync_out),
    .vsync_out(vsync_out), .red_out(red_out), .hcnt(hcnt));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_short_high = 0, n_long_high = 0, n_short_line = 0, n_one_low = 0;

  initial begin : watchdog
    repeat (LINES * 1600 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int on_time(logic [1:0] c);
    case (c)
      2'b11: return 314;
      2'b10: return 157;
      2'b01: return 79;
      default: return 0;
    endcase
  endfunction

  logic [1:0] cur [1:200];
  logic [1:0] prev [1:200];
  logic [1:0] last_pix [1:200];   // pixels of the line before, still lighting

  initial begin
    int hs_high, line_t, carry;
    foreach (cur[k]) begin cur[k] = 0; prev[k] = 0; last_pix[k] = 0; end
    carry = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int l = 0; l < LINES; l++) begin
      case (l % 8)
        0: hs_high = 1049;
        1: hs_high = 1498;
        default: hs_high = $urandom_range(1049, 1498);
      endcase
      line_t = (hs_high + 1 > 1265) ? hs_high + 1 : 1265;
      if (l % 8 > 2) line_t = $urandom_range(line_t, 1600);
      if (hs_high == 1049) n_short_high++;
      if (hs_high == 1498) n_long_high++;
      if (line_t == 1265) n_short_line++;
      if (line_t == hs_high + 1) n_one_low++;
      last_pix = cur;
      prev = cur;
      foreach (cur[k]) cur[k] = 2'($urandom);
      for (int t = 0; t < line_t; t++) begin
        @(negedge clk);
        hsync = (t < hs_high);
        red = (t >= 100 && t < 500) ? cur[(t - 100) / 2 + 1] : 2'($urandom);
        #1;
        for (int i = 0; i < 50; i++) begin
          int want, start;
          logic [1:0] c;
          want = 0;
          for (int p = 0; p < 4; p++) begin
            start = 99 + 317 * p;
            if (t >= start && t < start + 317) begin
              c = (p < 2) ? prev[4 * i + p + 1] : cur[4 * i + p + 1];
              want = (t - start < on_time(c)) ? 1 : 0;
            end
          end
          // T4 of the line before may still be lit at the start of this one
          if (t < 99 && carry + t < 99 + 3 * 317 + on_time(last_pix[4 * i + 4]) && l > 0)
            want = (carry + t >= 99 + 3 * 317) ? 1 : 0;
          checks++;
          if (laser[i] != want[0]) begin
            failures++;
            if (failures < 20) $display("line %0d (high %0d, len %0d) t%0d laser %0d = %0b",
                                        l, hs_high, line_t, t, i, laser[i]);
          end
        end
      end
      carry = line_t;
    end
    $display("lines: H-sync high 1049: %0d, 1498: %0d, length 1265: %0d, one-clock low: %0d",
             n_short_high, n_long_high, n_short_line, n_one_low);
    checks += 4;
    if (n_short_high == 0) failures++;
    if (n_long_high == 0) failures++;
    if (n_short_line == 0) failures++;
    if (n_one_low == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
