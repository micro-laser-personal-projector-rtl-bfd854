// line_counter - the horizontal clock counter (hcnt) of the data selector.
//
// hcnt counts 50 MHz clocks while H-sync is high and is cleared while H-sync
// is low, so at every clock it tells how far the current scan line has got;
// all sampling and trigger times of the main driver are values of hcnt.
// After reaching HCNT_MAX it rolls over to zero, as the prototype's counter
// does. Counting, clearing and the roll-over point follow the prototype; the
// asynchronous active-low reset is this design's choice. H-sync is assumed to
// be synchronous to clk (the ADC and the FPGA share the clock).
//
// Timing: hcnt is registered. On the first clock edge at which H-sync is
// sampled high, hcnt goes from 0 to 1.
module line_counter #(
  parameter int unsigned HCNT_W   = mlpp_pkg::HCNT_W,
  parameter int unsigned HCNT_MAX = mlpp_pkg::HCNT_MAX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hsync,
  output logic [HCNT_W-1:0] hcnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          hcnt <= '0;
    else if (!hsync)                     hcnt <= '0;
    else if (hcnt < HCNT_W'(HCNT_MAX))   hcnt <= hcnt + 1'b1;
    else                                 hcnt <= '0;
  end

endmodule
