// phase_sampler - one of the four "main drivers" of the data selector.
//
// A scan line of 200 pixels is shown by 50 lasers, each laser showing four
// neighbouring pixels in turn. Phase p (0..3) collects pixels p+1, p+5, p+9,
// ..., p+197: one pixel lasts two clocks, so the pixels of one phase are
// eight clocks apart. Lane i takes the 2-bit red code present while
// hcnt == SAMPLE_BASE + SAMPLE_STRIDE*i; phase 0 samples at 100, 108, ...,
// 492, phases 1..3 start 2, 4 and 6 clocks later.
//
// The block also produces the two control strobes of its phase:
//   be  - buffer enable, high for BE_LEN clocks starting at the last sample
//         (492/493 for phase 0); the line buffer copies lane_code while it is
//         high, and the copy made on the second clock holds the last lane.
//   sme - the phase trigger Tn (state machine enable), high while
//         TRIG_START <= hcnt < TRIG_START+TRIG_LEN (98-99, 415-416, 732-733,
//         1049-1050 for T1..T4). It hands the buffered codes to the lasers.
// All sample and strobe times are the prototype's. The lane registers are
// cleared by reset, which is this design's choice.
//
// Timing: lane_code is registered (valid the clock after the sample); be and
// sme are decoded combinationally from the registered hcnt.
module phase_sampler #(
  parameter int unsigned N_LASERS      = mlpp_pkg::N_LASERS,
  parameter int unsigned HCNT_W        = mlpp_pkg::HCNT_W,
  parameter int unsigned SAMPLE_BASE   = mlpp_pkg::SAMPLE_BASE,
  parameter int unsigned SAMPLE_STRIDE = mlpp_pkg::SAMPLE_STRIDE,
  parameter int unsigned TRIG_START    = mlpp_pkg::TRIG_BASE,
  parameter int unsigned TRIG_LEN      = mlpp_pkg::TRIG_LEN,
  parameter int unsigned BE_LEN        = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [HCNT_W-1:0]        hcnt,
  input  logic [1:0]               red,
  output logic [N_LASERS-1:0][1:0] lane_code,
  output logic                     be,
  output logic                     sme
);

  localparam int unsigned LAST_SAMPLE = SAMPLE_BASE + SAMPLE_STRIDE * (N_LASERS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_code <= '0;
    end else begin
      for (int unsigned i = 0; i < N_LASERS; i++) begin
        if (hcnt == HCNT_W'(SAMPLE_BASE + SAMPLE_STRIDE * i)) lane_code[i] <= red;
      end
    end
  end

  always_comb begin
    be  = (hcnt >= HCNT_W'(LAST_SAMPLE)) && (hcnt < HCNT_W'(LAST_SAMPLE + BE_LEN));
    sme = (hcnt >= HCNT_W'(TRIG_START))  && (hcnt < HCNT_W'(TRIG_START + TRIG_LEN));
  end

endmodule
