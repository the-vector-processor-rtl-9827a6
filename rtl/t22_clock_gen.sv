// t22_clock_gen: T22 Clock Generator of the Main Controller.
//
// The Ready input of an 8087 has to be switched in step with the T2 clock of
// a CPU bus cycle to meet its set-up and hold times. A clock counter restarts
// whenever the status lines are passive and counts the clocks of active
// status: the first is T1, the second T2. After a data strobe t31 (a decoded
// opcode byte) the flag q61 is set; the T2 clock of the next bus cycle then
// produces the one-clock strobe t22 and clears q61.
//
// Interface: t22 is combinational from the status lines and the registered
// counter. The counter/decoder idea and the q61 arming are the document's;
// its circuit is not reproduced, the counter width and restart rule are this
// design's choice.
module t22_clock_gen
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] bus_status,
  input  logic       t31,
  output logic       t22
);

  logic [1:0] tcnt;   // active-status clocks seen so far, saturating at 3
  logic       q61;
  logic       active;

  assign active = bus_status_e'(bus_status) != BUS_PASSIVE;
  assign t22    = q61 && active && (tcnt == 2'd1);

  always_ff @(posedge clk) begin
    if (rst) begin
      tcnt <= '0;
      q61  <= 1'b0;
    end else begin
      if (!active)            tcnt <= '0;
      else if (tcnt != 2'd3)  tcnt <= tcnt + 2'd1;
      if (t22)                q61 <= 1'b0;
      else if (t31)           q61 <= 1'b1;
    end
  end

endmodule
