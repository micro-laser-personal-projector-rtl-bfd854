// tb_laser_actuator - checks all 50 lasers over a run of phase triggers.
//
// Triggers two clocks long arrive every 317 clocks, as T1..T4 do, each with
// 50 random codes on the bus during the trigger. For every laser the
// testbench counts the clocks it is lit before the next trigger and the
// clock it first lights, and compares them with the on-time of its code
// (314/157/79/0 clocks, starting one clock after the trigger begins). Codes
// on the bus after the first trigger clock must be ignored, so the second
// trigger clock carries different random codes.
module tb_laser_actuator;
  logic             clk = 0, rst_n = 0, sme = 0;
  logic [49:0][1:0] code = '0, sent;
  logic [49:0]      led;
  int checks = 0, failures = 0;
  int seen [4];
  int on_cnt [50], first_on [50];

  laser_actuator dut (.clk(clk), .rst_n(rst_n), .sme(sme), .code(code), .led(led));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
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

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int trig = 0; trig < 40; trig++) begin
      @(negedge clk);
      for (int i = 0; i < 50; i++) sent[i] = 2'($urandom);
      code = sent; sme = 1;
      @(negedge clk);
      for (int i = 0; i < 50; i++) code[i] = 2'($urandom);
      foreach (on_cnt[i]) begin on_cnt[i] = 0; first_on[i] = -1; end
      // clocks 1..316 of the slot; the next trigger starts at clock 317
      for (int k = 1; k < 317; k++) begin
        if (k == 2) begin sme = 0; code = '0; end
        for (int i = 0; i < 50; i++)
          if (led[i]) begin
            on_cnt[i]++;
            if (first_on[i] < 0) first_on[i] = k;
          end
        if (k < 316) @(negedge clk);
      end
      for (int i = 0; i < 50; i++) begin
        checks++;
        if (on_cnt[i] != want_on(sent[i]) ||
            (want_on(sent[i]) > 0 && first_on[i] != 1)) begin
          failures++;
          if (failures < 10)
            $display("trigger %0d laser %0d code %b: on %0d from %0d", trig, i, sent[i], on_cnt[i], first_on[i]);
        end
        seen[sent[i]]++;
      end
    end
    for (int c = 0; c < 4; c++) begin checks++; if (seen[c] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
