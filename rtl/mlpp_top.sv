// mlpp_top - main driver of a 50-laser personal projector.
//
// The projector draws a picture with a row of 50 red VCSELs. A spinning
// mirror prism sweeps the row down the screen, one position per VGA scan
// line. Each laser shows four neighbouring pixels, so a line of 200 pixels
// is drawn in four phases T1..T4 (a piezo actuator is meant to shift the
// lens by one pixel between phases). Brightness comes from how long a laser
// stays on in its phase: four levels from the two most significant bits of
// the video ADC.
//
// Datapath, per scan line (hcnt = clocks since H-sync rose, 50 MHz):
//   data_selector   picks pixel 4i+p+1 into lane i of phase p at
//                   hcnt = 100+2p+8i and raises be[p] at 492+2p.
//   pixel_buffer x4 holds a phase's 50 codes from its be until the next.
//   tristate_stage  x4 put a buffer on the laser bus while its trigger
//                   sme[p] is high: hcnt 98, 415, 732, 1049 (+1).
//   laser_actuator  starts all 50 laser state machines on each trigger;
//                   lasers stay on 314/157/79/0 clocks.
// Side outputs: piezo_memory turns the triggers into a 2-bit staircase code
// for the external ladder DAC, and motor_sync_divider turns the 96 % duty
// V-sync into a 50 % duty motor synchronisation signal. H-sync, V-sync and
// the red code are also passed straight through, as on the prototype board.
//
// With these times the first two phases of a line show the codes buffered
// on the previous line and the last two the codes of the current one; the
// picture is at most one scan line behind the source. The structure and all
// times are the prototype's; the AND-OR bus in place of three-state lines
// and the reset values are this design's choices.
//
// Interface: laser[i] drives VCSEL i; piezo_step is the 2-bit code for the
// external ladder DAC and piezo_phase the same as one-hot; sme shows the
// triggers T1..T4 and hcnt the line counter, for observation. All inputs
// are synchronous to clk. H-sync must stay high for 1049 to 1498 clocks:
// long enough for hcnt to reach 1049, the first clock of T4, and short
// enough that the line counter does not wrap and fire T1 again. The line
// period must be at least 1265 clocks, so that T4's longest pulse (lit
// through hcnt 1363) ends before the next line's first pulse.
module mlpp_top #(
  parameter int unsigned N_LASERS = mlpp_pkg::N_LASERS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                hsync,
  input  logic                vsync,
  input  logic [1:0]          red,
  output logic [N_LASERS-1:0] laser,
  output logic [1:0]          piezo_step,
  output logic [3:0]          piezo_phase,
  output logic                motor_ctrl,
  output logic [3:0]          sme,
  output logic                hsync_out,
  output logic                vsync_out,
  output logic [1:0]          red_out,
  output logic [10:0]         hcnt
);

  import mlpp_pkg::*;

  logic [N_PHASES-1:0][N_LASERS-1:0][1:0] lane_code;
  logic [N_PHASES-1:0][N_LASERS-1:0][1:0] buf_code;
  logic [N_PHASES-1:0][N_LASERS-1:0][1:0] stage_code;
  logic [N_PHASES-1:0]                    be;
  logic [N_PHASES-1:0]                    drive;
  logic [N_LASERS-1:0][1:0]               bus_code;

  data_selector #(.N_LASERS(N_LASERS), .N_PHASES(N_PHASES)) u_sel (
    .clk       (clk),
    .rst_n     (rst_n),
    .hsync     (hsync),
    .red       (red),
    .lane_code (lane_code),
    .be        (be),
    .sme       (sme),
    .hcnt      (hcnt)
  );

  for (genvar p = 0; p < N_PHASES; p++) begin : g_phase
    pixel_buffer #(.N_LASERS(N_LASERS)) u_buf (
      .clk   (clk),
      .rst_n (rst_n),
      .be    (be[p]),
      .din   (lane_code[p]),
      .dout  (buf_code[p])
    );
    tristate_stage #(.N_LASERS(N_LASERS)) u_stage (
      .sme     (sme[p]),
      .din     (buf_code[p]),
      .bus_out (stage_code[p]),
      .drive   (drive[p])
    );
  end

  // AND-OR laser bus: at most one stage drives it at a time.
  always_comb begin
    bus_code = '0;
    for (int unsigned p = 0; p < N_PHASES; p++) bus_code |= stage_code[p];
  end

  laser_actuator #(.N_LASERS(N_LASERS)) u_act (
    .clk   (clk),
    .rst_n (rst_n),
    .sme   (|drive),
    .code  (bus_code),
    .led   (laser)
  );

  piezo_memory #(.N_PHASES(N_PHASES)) u_piezo (
    .clk   (clk),
    .rst_n (rst_n),
    .sme   (sme),
    .step  (piezo_step),
    .phase (piezo_phase)
  );

  motor_sync_divider u_motor (
    .clk        (clk),
    .rst_n      (rst_n),
    .vsync      (vsync),
    .motor_ctrl (motor_ctrl)
  );

  assign hsync_out = hsync;
  assign vsync_out = vsync;
  assign red_out   = red;

  // Bus ownership rule: two phases never drive the laser bus together
  // (during reset hcnt is 0, so no stage drives).
  a_one_driver: assert property (@(posedge clk) $onehot0(drive));

endmodule
