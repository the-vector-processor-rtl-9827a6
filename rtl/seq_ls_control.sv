// seq_ls_control: Sequential LOAD/STORE Control.
//
// Runs serial mode, in which the 8087s are activated one after another so
// that each loads or stores its own element. After DF FF the next
// coprocessor instruction is copied into every 8087's queue at once (all
// Ready lines follow r88, queue status withheld from all but the 87-1);
// the WAIT byte then sets c1, the 87-1 executes, and each following 8087 is
// woken by the previous one's BUSY falling. DF FE returns to scalar mode.
//
// Contents: Main Controller (Control Block and T22 Clock Generator), 87-1
// Ready and Queue Status Controls, 87-2 Ready and Queue Status Controls.
// Further coprocessors are handled by coproc_n_control, chained on sm2.
// The partitioning is the document's.
module seq_ls_control (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] bus_status,
  input  logic [1:0] cpu_qs,
  input  logic [7:0] ad,
  input  logic       t31,
  input  logic       v1,      // DF FF
  input  logic       v2,      // DF FE
  input  logic       r88,
  input  logic       b1,
  input  logic       b2,
  input  logic       sp1,     // from the Parallel Ready Control
  input  logic       pm2,     // from the Parallel Queue Status Control
  output logic       t22,
  output logic       q31,
  output logic       c1,
  output logic       sm1,
  output logic       sm2,
  output logic       ready1,
  output logic       ready2,
  output logic [1:0] qs1,
  output logic [1:0] qs2
);

  logic g1, act2;

  t22_clock_gen u_t22 (.clk, .rst, .bus_status, .t31, .t22);

  main_control u_mc (.clk, .rst, .ad, .t31, .t22, .v1, .v2, .q31, .c1, .sm1);

  ready1_control u_r1 (.c1, .b1, .r88, .g(g1), .ready(ready1));

  qs1_control u_q1 (.g(g1), .cpu_qs, .qs_out(qs1));

  ready2_control u_r2 (
    .clk, .rst, .sp1, .c1, .r88, .b1, .b2, .sm2, .act(act2), .ready(ready2)
  );

  qs2_control u_q2 (.act(act2), .pm(pm2), .cpu_qs, .qs_out(qs2));

endmodule
