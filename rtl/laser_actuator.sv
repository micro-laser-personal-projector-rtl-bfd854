// laser_actuator - the 50 laser state machines and their shared counter.
//
// Every trigger T1..T4 (any bit of the shared bus enable, sme) hands the
// actuator 50 codes from one phase buffer. On the first clock of a trigger
// the counter acnt restarts from zero and every laser_fsm loads its code;
// each laser then stays on for 314, 157 or 79 clocks or stays off. The
// counter counts up to ACNT_MAX and rolls over, as the prototype's does; the
// 317-clock spacing of the triggers lets every laser finish before the next
// trigger arrives.
//
// Restarting the counter on the trigger's rising edge, and loading only on
// that edge although a trigger lasts two clocks, is this design's choice.
//
// Timing: codes must be valid on the first clock of sme. led[i] rises one
// clock after that clock.
module laser_actuator #(
  parameter int unsigned N_LASERS = mlpp_pkg::N_LASERS,
  parameter int unsigned ACNT_W   = mlpp_pkg::ACNT_W,
  parameter int unsigned ACNT_MAX = mlpp_pkg::ACNT_MAX
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sme,
  input  logic [N_LASERS-1:0][1:0] code,
  output logic [N_LASERS-1:0]      led
);

  logic              sme_q;
  logic              start;
  logic [ACNT_W-1:0] acnt;

  assign start = sme && !sme_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sme_q <= 1'b0;
      acnt  <= '0;
    end else begin
      sme_q <= sme;
      if (start)                          acnt <= '0;
      else if (acnt < ACNT_W'(ACNT_MAX))  acnt <= acnt + 1'b1;
      else                                acnt <= '0;
    end
  end

  for (genvar i = 0; i < N_LASERS; i++) begin : g_laser
    laser_fsm #(.ACNT_W(ACNT_W)) u_fsm (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (start),
      .code  (code[i]),
      .acnt  (acnt),
      .led   (led[i])
    );
  end

endmodule
