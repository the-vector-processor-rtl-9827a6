// vector_controller: the Vector Controller, top level.
//
// Turns a PC with one 8088 CPU and N_COPROC 8087 coprocessors into a vector
// machine by deciding, clock by clock, which 8087s may run (their READY
// inputs) and which see the CPU's instruction-queue status (their QS
// inputs). Three modes:
//   scalar   - power-up state; only the 87-1 works, as in a plain PC;
//   serial   - (DF FF) the next coprocessor instruction is copied into every
//              8087, then they execute it one after another, each on its own
//              memory operand: element-wise load or store;
//   parallel - (DF FD) every 8087 executes the following coprocessor
//              instructions at the same time on the data it holds.
// DF FE returns to scalar mode. Every vector instruction must follow a JMP
// so that it is the first byte fetched after the queue is emptied.
//
// Structure: Vector Instructions Decoder -> Sequential LOAD/STORE Control
// (87-1 and 87-2) and Parallel Execution Control; one coproc_n_control per
// further 8087, chained through their "finished" signals.
//
// Interface: bus_status = {S2,S1,S0}, cpu_qs = {QS1,QS0}, ad = AD7..AD0,
// r88 = READY of the 8284, busy[i] = BUSY of 8087 number i+1. cop_ready[i]
// and cop_qs[i] = {QS1,QS0} drive 8087 number i+1. vec_op pulses for one
// clock per decoded DF Fk. All flip-flops use the rising edge of clk;
// rst puts the controller into scalar mode. Assertions at the end state the
// mode rules: one vector instruction per clock, 87-2..87-N idle in scalar
// mode, and at most one 8087 ready once serial loading has ended.
module vector_controller #(
  parameter int unsigned N_COPROC = 10   // 8087s on the bus, >= 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [2:0]               bus_status,
  input  logic [1:0]               cpu_qs,
  input  logic [7:0]               ad,
  input  logic                     r88,
  input  logic [N_COPROC-1:0]      busy,
  output logic [N_COPROC-1:0]      cop_ready,
  output logic [N_COPROC-1:0][1:0] cop_qs,
  output logic [15:0]              vec_op,
  output logic                     serial_mode,
  output logic                     parallel_mode
);

  import vc_pkg::*;

  logic t31, t22, q31, c1, sm1, sm2, pm1, sp1, pm2;
  logic [N_COPROC-1:2] done_chain;  // done_chain[i]: 8087 number i has finished
                                    // (87-1's end is its BUSY, used inside u_sls)

  vector_instr_decoder u_vid (
    .clk, .rst, .cpu_qs, .bus_status, .ad, .q31, .t31, .vec_op
  );

  seq_ls_control u_sls (
    .clk, .rst, .bus_status, .cpu_qs, .ad, .t31,
    .v1(vec_op[VEC_SERIAL]), .v2(vec_op[VEC_SCALAR]),
    .r88, .b1(busy[0]), .b2(busy[1]), .sp1, .pm2,
    .t22, .q31, .c1, .sm1, .sm2,
    .ready1(cop_ready[0]), .ready2(cop_ready[1]),
    .qs1(cop_qs[0]), .qs2(cop_qs[1])
  );

  parallel_exec_control u_pec (
    .clk, .rst, .cpu_qs, .v3(vec_op[VEC_PARALLEL]), .q31, .t22, .sm1,
    .pm1, .sp1, .pm2
  );

  assign done_chain[2] = !sm2;

  for (genvar n = 3; n <= N_COPROC; n++) begin : g_cop
    logic p_n;   // the last 8087's p_n has no successor and stays unused
    coproc_n_control u_cn (
      .clk, .rst, .c1, .sp1, .pm2, .r88,
      .prev_done(done_chain[n-1]), .busy(busy[n-1]), .cpu_qs,
      .p_n, .ready(cop_ready[n-1]), .qs_out(cop_qs[n-1])
    );
    if (n < N_COPROC) begin : g_done
      assign done_chain[n] = !p_n;
    end
  end

  assign serial_mode   = q31;
  assign parallel_mode = pm1;

  // ---- rules of the mode protocol ------------------------------------------
  // at most one vector instruction is decoded per clock
  a_vec_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(vec_op));
  // scalar mode: the 87-2 .. 87-N are held in wait and see only "no
  // operation" or "queue empty"
  a_scalar_wait: assert property (@(posedge clk) disable iff (rst)
    !q31 && !pm1 && !sp1 |-> cop_ready[N_COPROC-1:1] == '0);
  for (genvar n = 1; n < N_COPROC; n++) begin : g_chk
    a_scalar_qs: assert property (@(posedge clk) disable iff (rst)
      !q31 && !pm1 && !sp1 |-> !cop_qs[n][0]);
  end
  // serial mode after the loading window: one coprocessor at a time
  a_serial_one: assert property (@(posedge clk) disable iff (rst) c1 |-> $onehot0(cop_ready));

endmodule
