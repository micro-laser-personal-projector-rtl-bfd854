// pixel_buffer - line buffer of one phase (50 two-bit codes).
//
// The sampler keeps overwriting its lanes as the next line arrives, so each
// phase copies its 50 codes into this buffer while its buffer enable (be) is
// high, at the end of that phase's sampling. The buffer then holds them until
// the phase trigger hands them to the laser state machines. The prototype
// built this as a level-enabled latch; here it is a clock-enabled register,
// which loads on every clock that be is high. Reset clears it (lasers off).
//
// Timing: dout changes on the clock edge at which be is sampled high.
module pixel_buffer #(
  parameter int unsigned N_LASERS = mlpp_pkg::N_LASERS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     be,
  input  logic [N_LASERS-1:0][1:0] din,
  output logic [N_LASERS-1:0][1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (be) dout <= din;
  end

endmodule
