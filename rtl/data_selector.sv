// data_selector - splits each scan line of red codes into four phases.
//
// The line counter measures clocks since H-sync rose. Four phase samplers,
// one per pixel position under a laser, pick every fourth pixel of the line
// into 50 lanes: phase p samples at hcnt = 100 + 2p + 8i for lane i and fires
// its trigger T(p+1) at hcnt = 98 + 317p for two clocks. Phase p's buffer
// enable comes at its last sample, 492 + 2p. The 317-clock trigger spacing is
// the 314-clock longest laser-on time plus a margin of a few clocks.
//
// One shared line counter drives all four phases; the prototype gave each of
// its four drivers an identical counter of its own, which behaves the same.
//
// Ports: lane_code[p][i] is the code for laser i in phase p; be[p], sme[p]
// are that phase's buffer enable and trigger. Timing as in phase_sampler.
module data_selector #(
  parameter int unsigned N_LASERS = mlpp_pkg::N_LASERS,
  parameter int unsigned N_PHASES = mlpp_pkg::N_PHASES
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    hsync,
  input  logic [1:0]                              red,
  output logic [N_PHASES-1:0][N_LASERS-1:0][1:0]  lane_code,
  output logic [N_PHASES-1:0]                     be,
  output logic [N_PHASES-1:0]                     sme,
  output logic [mlpp_pkg::HCNT_W-1:0]             hcnt
);

  import mlpp_pkg::*;

  line_counter u_hcnt (
    .clk   (clk),
    .rst_n (rst_n),
    .hsync (hsync),
    .hcnt  (hcnt)
  );

  for (genvar p = 0; p < N_PHASES; p++) begin : g_phase
    phase_sampler #(
      .N_LASERS     (N_LASERS),
      .SAMPLE_BASE  (SAMPLE_BASE + PIXEL_CLKS * p),
      .SAMPLE_STRIDE(SAMPLE_STRIDE),
      .TRIG_START   (TRIG_BASE + TRIG_SPACING * p),
      .TRIG_LEN     (TRIG_LEN)
    ) u_phase (
      .clk       (clk),
      .rst_n     (rst_n),
      .hcnt      (hcnt),
      .red       (red),
      .lane_code (lane_code[p]),
      .be        (be[p]),
      .sme       (sme[p])
    );
  end

endmodule
