// ladder_dac - behavioural model of the external resistor-ladder DAC.
//
// Testbench model, not synthesizable logic: it models the small resistor ladder outside the
// FPGA that turns the piezo memory's step code into the staircase voltage of
// the right-shift piezo-electric signal. An ideal R-2R ladder of STEP_W bits
// gives vout = VFULL * step / 2**STEP_W. The ladder itself is the
// prototype's; its width, its full-scale voltage (the FPGA's 3.3 V I/O
// supply) and the ideal linear response are this model's assumptions.
//
// Timing: vout follows step after SETTLE time units of the simulation.
module ladder_dac #(
  parameter int unsigned STEP_W    = 2,
  parameter real         VFULL     = 3.3,
  parameter int unsigned SETTLE = 5
) (
  input  logic [STEP_W-1:0] step,
  output real               vout
);

  initial vout = 0.0;

  always @(step) begin
    #(SETTLE) vout = VFULL * real'(step) / real'(2 ** STEP_W);
  end

endmodule
