// laser_fsm - state machine that turns one 2-bit code into a laser pulse.
//
// Brightness is shown by how long the laser stays on within its 317-clock
// slot: HIGH 314 clocks (6.28 us at 50 MHz), MEDIUM 157, LOW 79, OFF none.
// The four states carry these names. When the phase trigger starts (load),
// the machine enters the state named by the code; while in a lit state the
// laser is on, and it returns to OFF once the shared actuator counter acnt,
// which restarts from zero at the same edge, has counted the state's
// on-time. A code of 00 sends the machine to OFF at once.
//
// States, codes and on-times follow the prototype. Comparing against a
// counter that restarts at each trigger, so that the on-time is exact, is
// this design's choice.
//
// Timing: on the edge that samples load high, state <= code and acnt is
// cleared by the actuator; led is high from the next clock for exactly
// on_clocks(code) clocks.
module laser_fsm #(
  parameter int unsigned ACNT_W  = mlpp_pkg::ACNT_W,
  parameter int unsigned ON_HIGH = mlpp_pkg::ON_HIGH,
  parameter int unsigned ON_MED  = mlpp_pkg::ON_MED,
  parameter int unsigned ON_LOW  = mlpp_pkg::ON_LOW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [1:0]        code,
  input  logic [ACNT_W-1:0] acnt,
  output logic              led
);

  import mlpp_pkg::*;

  bright_e state;
  logic    expire;

  // The last lit clock is the one on which acnt equals on-time minus one.
  always_comb begin
    unique case (state)
      BR_HIGH: expire = (acnt >= ACNT_W'(ON_HIGH - 1));
      BR_MED:  expire = (acnt >= ACNT_W'(ON_MED - 1));
      BR_LOW:  expire = (acnt >= ACNT_W'(ON_LOW - 1));
      default: expire = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= BR_OFF;
    else if (load)   state <= bright_e'(code);
    else if (expire) state <= BR_OFF;
  end

  assign led = (state != BR_OFF);

endmodule
