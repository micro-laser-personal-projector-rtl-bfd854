// tristate_stage - connects one phase's buffer to the shared laser bus.
//
// The four line buffers share one path into the laser actuator. In the
// prototype each buffer drove it through three-state outputs, enabled only
// while that phase's trigger (SME) was high. Inside an FPGA or ASIC a
// three-state net is better built as an AND-OR bus: this stage drives its
// codes while sme is high and all zeros otherwise, and the owner of the bus
// ORs the four stages together (the triggers never overlap). drive tells the
// owner that this stage has the bus. Replacing high impedance by zeros is
// this design's choice.
//
// Timing: purely combinational.
module tristate_stage #(
  parameter int unsigned N_LASERS = mlpp_pkg::N_LASERS
) (
  input  logic                     sme,
  input  logic [N_LASERS-1:0][1:0] din,
  output logic [N_LASERS-1:0][1:0] bus_out,
  output logic                     drive
);

  always_comb begin
    bus_out = sme ? din : '0;
    drive   = sme;
  end

endmodule
