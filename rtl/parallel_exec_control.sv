// parallel_exec_control: Parallel Execution Control.
//
// Parallel mode: after DF FD every 8087 is woken at once (Ready follows the
// 8284's READY through sp1) and receives the CPU's queue status (pm2), so a
// coprocessor instruction is executed by all of them on their own data. The
// mode ends with DF FE; the queue status is cut earlier, at the queue-empty
// code of the JMP in front of it. Contents: Parallel Ready Control and
// Parallel Queue Status Control, as partitioned in the document.
module parallel_exec_control (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] cpu_qs,
  input  logic       v3,
  input  logic       q31,
  input  logic       t22,
  input  logic       sm1,
  output logic       pm1,
  output logic       sp1,
  output logic       pm2
);

  parallel_ready_control u_prc (.clk, .rst, .v3, .q31, .t22, .sm1, .pm1, .sp1);

  parallel_qs_control u_pqc (.clk, .rst, .cpu_qs, .sp1, .pm1, .sm1, .pm2);

endmodule
