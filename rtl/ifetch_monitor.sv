// ifetch_monitor: Instruction Fetch Bus Cycle Monitor of the vector
// instruction decoder.
//
// A vector instruction is only looked for in the first instruction fetched
// after the 8088 has emptied its prefetch queue (a JMP in front of every
// vector instruction guarantees this). The queue-empty code on QS1..QS0 sets
// the flag q11; while q11 (or the serial-mode flag q31 of the Main Controller,
// which keeps monitoring on for the WAIT byte) is high, s is high during the
// active-status part (T1..T2) of every instruction-fetch bus cycle. clr1 from
// Clearing and Control drops q11 at the end of the look-up.
//
// Timing: q11 rises at the clock edge after the queue-empty code; s is
// combinational from the status lines. The gating follows the published
// monitor; re-timing the preset onto the system clock is this design's
// choice.
module ifetch_monitor
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] cpu_qs,      // {QS1,QS0}
  input  logic [2:0] bus_status,  // {S2,S1,S0}
  input  logic       q31,         // serial-mode flag
  input  logic       clr1,        // end of look-up
  output logic       s,           // instruction fetch status seen while armed
  output logic       q11          // armed
);

  always_ff @(posedge clk) begin
    if (rst || clr1)                 q11 <= 1'b0;
    else if (qs_e'(cpu_qs) == QS_EMPTY) q11 <= 1'b1;
  end

  assign s = (bus_status_e'(bus_status) == BUS_FETCH) && (q11 || q31);

endmodule
