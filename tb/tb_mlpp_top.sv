// tb_mlpp_top - end-to-end test of the projector main driver.
//
// Video source: VGA-like timing at 50 MHz, 1562 clocks per line (32 kHz)
// with H-sync high for the first 1381 clocks, and LINES lines per frame with
// V-sync low for the first 4 % of the lines. Each line carries 200 random
// 8-bit red samples, one every two clocks from 100 clocks after H-sync
// rises; the top sees only their two most significant bits, as from the
// ADC. The expected picture is computed here from the 8-bit values with the
// thresholds 192/128/64 (high/medium/low/off).
//
// Checked every clock for all 50 lasers: laser i in phase p shows pixel
// 4i+p+1, lit from hcnt 99+317p for 314/157/79/0 clocks. Phases whose
// trigger comes before the phase's buffer is loaded (T1, T2) show the
// previous line, the others the current one (on the very first line the
// previous line is the cleared buffer: all lasers off). Also checked: the piezo
// staircase code and the ladder-DAC voltage it gives, the 50 % duty motor
// signal over whole frames, and the pass-through outputs. Every mechanism
// is counted and must occur: each brightness, each trigger, a display from
// the previous and from the current line, each staircase step and a full
// motor period.
module tb_mlpp_top;
  localparam int LINES   = 525;   // VGA 640x480 frame
  localparam int FRAMES  = 3;
  localparam int LINE_T  = 1562;
  localparam int HS_HIGH = 1381;
  localparam int VS_LOW  = LINES * 4 / 100;

  logic        clk = 0, rst_n = 0, hsync = 0, vsync = 0;
  logic [1:0]  red = 0;
  logic [49:0] laser;
  logic [1:0]  piezo_step, red_out;
  logic [3:0]  piezo_phase, sme;
  logic        motor_ctrl, hsync_out, vsync_out;
  logic [10:0] hcnt;
  real         piezo_v;

  mlpp_top dut (
    .clk(clk), .rst_n(rst_n), .hsync(hsync), .vsync(vsync), .red(red),
    .laser(laser), .piezo_step(piezo_step), .piezo_phase(piezo_phase),
    .motor_ctrl(motor_ctrl), .sme(sme), .hsync_out(hsync_out),
    .vsync_out(vsync_out), .red_out(red_out), .hcnt(hcnt));

  ladder_dac #(.SETTLE(1)) u_dac (.step(piezo_step), .vout(piezo_v));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bright [4];      // lit pulses per brightness (index = code)
  int n_trig   [4];      // triggers seen per phase
  int n_step   [4];      // staircase levels seen
  int n_prev = 0, n_cur = 0, n_motor = 0;

  initial begin : watchdog
    repeat (LINES * FRAMES * LINE_T + 10000) @(posedge clk);
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

  // brightness of an 8-bit sample, by value range
  function automatic int level(logic [7:0] s);
    if (s >= 192) return 3;
    if (s >= 128) return 2;
    if (s >= 64)  return 1;
    return 0;
  endfunction

  function automatic int on_time(int lvl);
    case (lvl)
      3: return 314;
      2: return 157;
      1: return 79;
      default: return 0;
    endcase
  endfunction

  logic [7:0] cur [1:200];
  logic [7:0] prev [1:200];

  initial begin
    int unsigned motor_hi;
    foreach (cur[k]) begin cur[k] = 0; prev[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < FRAMES; f++) begin
      motor_hi = 0;
      for (int l = 0; l < LINES; l++) begin
        prev = cur;
        foreach (cur[k]) cur[k] = 8'($urandom);
        // iteration t: the line counter reads t while H-sync is high
        for (int t = 0; t < LINE_T; t++) begin
          logic [7:0] s;
          @(negedge clk);
          hsync = (t < HS_HIGH);
          vsync = !(l < VS_LOW);
          s = (t >= 100 && t < 500) ? cur[(t - 100) / 2 + 1] : 8'($urandom);
          red = s[7:6];
          if (motor_ctrl) motor_hi++;
          #1;
          // lasers
          for (int i = 0; i < 50; i++) begin
            int want, start, lvl;
            bit from_prev;
            want = 0;
            for (int p = 0; p < 4; p++) begin
              start = 99 + 317 * p;
              if (t >= start && t < start + 317 && t <= HS_HIGH) begin
                from_prev = (98 + 317 * p) < (493 + 2 * p);
                lvl = level(from_prev ? prev[4 * i + p + 1] : cur[4 * i + p + 1]);
                want = (t - start < on_time(lvl)) ? 1 : 0;
                if (t == start && lvl != 0) n_bright[lvl]++;
                if (t == start && lvl == 0) n_bright[0]++;
                if (t == start && i == 0) begin
                  if (from_prev) n_prev++; else n_cur++;
                end
              end
            end
            checks++;
            if (laser[i] != want[0]) begin
              failures++;
              if (failures < 20) $display("f%0d l%0d t%0d laser %0d = %0b", f, l, t, i, laser[i]);
            end
          end
          // triggers
          for (int p = 0; p < 4; p++)
            if (t == 98 + 317 * p) begin
              check("trigger", int'(sme[p]), 1);
              n_trig[p]++;
            end
          // piezo staircase and its DAC voltage
          if (t == 200 || t == 500 || t == 800 || t == 1200) begin
            int exp_step;
            exp_step = (t == 200) ? 0 : (t == 500) ? 1 : (t == 800) ? 2 : 3;
            check("piezo step", int'(piezo_step), exp_step);
            checks++;
            if (piezo_v < 3.3 * exp_step / 4.0 - 0.01 || piezo_v > 3.3 * exp_step / 4.0 + 0.01) begin
              failures++;
              $display("piezo voltage %f for step %0d", piezo_v, exp_step);
            end
            if (piezo_step == 2'(exp_step)) n_step[exp_step]++;
          end
          // pass-through
          if (t == 300) begin
            check("red_out", int'(red_out), int'(red));
            check("hsync_out", int'(hsync_out), int'(hsync));
            check("vsync_out", int'(vsync_out), int'(vsync));
          end
        end
      end
      // motor: 50 % duty over a whole frame once the period is known
      if (f >= 2) begin
        check("motor high clocks", int'(motor_hi), LINES * LINE_T / 2);
        n_motor++;
      end
    end
    for (int k = 0; k < 4; k++) begin
      $display("brightness %0d pulses %0d, trigger T%0d %0d, step %0d seen %0d",
               k, n_bright[k], k + 1, n_trig[k], k, n_step[k]);
      check("brightness used", int'(n_bright[k] > 0), 1);
      check("trigger used", int'(n_trig[k] > 0), 1);
      check("step used", int'(n_step[k] > 0), 1);
    end
    $display("previous-line phases %0d, current-line phases %0d, motor frames %0d", n_prev, n_cur, n_motor);
    check("previous-line display", int'(n_prev > 0), 1);
    check("current-line display", int'(n_cur > 0), 1);
    check("motor period", int'(n_motor > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
