// piezo_memory - remembers the last phase trigger for the piezo staircase.
//
// To show four pixels per laser, a piezo actuator is meant to shift the lens
// right by one laser-spot step for each phase, so its drive voltage must be a
// four-level staircase that steps with the triggers T1..T4 and returns to the
// first level each line. This block holds which trigger came last (phase,
// one-hot) and gives it as a 2-bit step number for an external resistor
// ladder DAC (0 after T1 ... 3 after T4). That the memory feeds a ladder DAC
// is the prototype's; the binary step code and the reset value (step 0) are
// this design's choices.
//
// Timing: phase and step change on the first clock edge at which a trigger is
// sampled high, and hold until the next trigger.
module piezo_memory #(
  parameter int unsigned N_PHASES = mlpp_pkg::N_PHASES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_PHASES-1:0]         sme,
  output logic [$clog2(N_PHASES)-1:0] step,
  output logic [N_PHASES-1:0]         phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= N_PHASES'(1);
    else if (|sme) phase <= sme;
  end

  always_comb begin
    step = '0;
    for (int unsigned p = 0; p < N_PHASES; p++)
      if (phase[p]) step = $clog2(N_PHASES)'(p);
  end

endmodule
