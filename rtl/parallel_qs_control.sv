// parallel_qs_control: Parallel Queue Status Control.
//
// In parallel mode the queue status of the CPU is passed to every 8087
// beyond the first while pm2 is high: pm2 rises with sp1 once pm1 is set,
// and ends at the first queue-empty code (flag q52). The queue-empty code
// comes from the JMP that must precede the closing DF FE, so the
// coprocessors stop taking bytes before they could start executing that
// escape and stay busy in a wait state. sm1 clears q52 for the next time.
// Built from the document's description; its circuit is not reproduced.
module parallel_qs_control
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] cpu_qs,
  input  logic       sp1,
  input  logic       pm1,
  input  logic       sm1,
  output logic       pm2
);

  logic q52;

  assign pm2 = pm1 && sp1 && !q52;

  always_ff @(posedge clk) begin
    if (rst || sm1)                           q52 <= 1'b0;
    else if (pm2 && qs_e'(cpu_qs) == QS_EMPTY) q52 <= 1'b1;
  end

endmodule
