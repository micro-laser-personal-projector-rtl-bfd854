// motor_sync_divider - turns V-sync into the 50 % duty motor control signal.
//
// V-sync is high for about 96 % of each frame and low for the rest. The
// spinning six-facet prism has to be locked to the frame, and its motor
// drive wants a square wave with the same period at 50 % duty. The counter
// vcnt counts clocks from each rising edge of V-sync; at that edge the count
// so far is kept as the frame period, and motor_ctrl is high for the first
// half of each frame. vcnt and the 96 % to 50 % conversion are the
// prototype's; measuring the period and halving it is this design's way of
// doing it. Until one full frame has been measured motor_ctrl stays low.
// VCNT_W must hold a frame: 21 bits cover 833,333 clocks (60 Hz at 50 MHz).
//
// Timing: motor_ctrl rises on the clock after V-sync is first sampled high
// and falls half a measured period later.
module motor_sync_divider #(
  parameter int unsigned VCNT_W = 21
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vsync,
  output logic motor_ctrl
);

  logic              vsync_q;
  logic [VCNT_W-1:0] vcnt;
  logic [VCNT_W-1:0] period;
  logic              rise;
  logic              armed;   // a rising edge has been seen since reset

  assign rise = vsync && !vsync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vsync_q <= 1'b0;
      armed   <= 1'b0;
      vcnt    <= '0;
      period  <= '0;
    end else begin
      vsync_q <= vsync;
      if (rise) begin
        armed  <= 1'b1;
        vcnt   <= '0;
        if (armed) period <= vcnt + 1'b1;
      end else if (vcnt != '1) begin
        vcnt <= vcnt + 1'b1;
      end
    end
  end

  assign motor_ctrl = (vcnt < (period >> 1));

endmodule
