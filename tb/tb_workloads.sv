// tb_workloads: runs the two example programs of the design on the Vector
// Controller at its default size (ten 8087s), in one simulation:
//
//   A. element-wise addition of three pairs: serial load of the first
//      elements into 87-1..87-3, scalar, serial load of the second
//      elements, scalar, parallel FADD, scalar, serial store of the three
//      sums, scalar.
//   B. sqrt(tan(a + c)) for four elements: serial load into 87-1..87-4,
//      scalar, parallel FLD constant / FADD / FPTAN / FSQRT each followed by
//      WAIT, scalar, serial store of the four results, scalar.
//
// Fewer elements than coprocessors is the point of these programs: the
// serial hand-over must stop after element k, the coprocessors after it must
// not execute anything while the block's elements are processed, and
// parallel mode must still start
// every coprocessor in the same clock. One effect of the controller is
// checked on purpose: 87-(k+1) received the block's first instruction through
// the parallel loading, the hand-over makes it ready once 87-k is done, and it
// starts that instruction when the JMP in front of FSCALAR is taken.
//
// The 8088 side is the same bus-cycle model as in tb_vector_controller:
// fetch T1, T2, zero to two random wait states, data clock, T4; queue
// status per byte; JMP ends with queue-empty; WAIT holds until every BUSY
// is low. Every vector instruction is preceded by a JMP, as the design
// requires. Program A's listing puts no WAIT after the parallel FADD; here
// one is added so the sums are complete before parallel mode is left (the
// coprocessor model only counts down its execution time while its READY is
// high).
module tb_workloads;
  import vc_pkg::*;

  localparam int N = 10;

  logic               clk = 1'b0;
  logic               rst;
  logic [2:0]         bus_status;
  logic [1:0]         cpu_qs;
  logic [7:0]         ad;
  logic               r88;
  logic [N-1:0]       busy, loaded, exec;
  logic [N-1:0]       cop_ready;
  logic [N-1:0][1:0]  cop_qs;
  logic [15:0]        vec_op;
  logic               serial_mode, parallel_mode;

  int checks = 0, failures = 0;
  longint cyc = 0;

  vector_controller dut (
    .clk, .rst, .bus_status, .cpu_qs, .ad, .r88, .busy,
    .cop_ready, .cop_qs, .vec_op, .serial_mode, .parallel_mode
  );

  for (genvar i = 0; i < N; i++) begin : g_cop
    cop8087_model #(.EXEC_CLKS(15 + 2 * i)) u_cop (
      .clk, .rst, .bus_status, .ad, .ready(cop_ready[i]), .qs(cop_qs[i]),
      .busy(busy[i]), .loaded(loaded[i]), .exec(exec[i])
    );
  end

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  int exec_order [$];
  int same_clock_all = 0;
  int serial_runs = 0, parallel_ops = 0, m_tail_start = 0, n_waits = 0;

  always @(negedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) if (exec[i]) exec_order.push_back(i);
    if (&exec) same_clock_all++;
  end

  // ---- 8088 bus model ------------------------------------------------------
  task automatic clock1();
    @(posedge clk); #1;
  endtask

  task automatic fetch(input logic [7:0] b);
    bus_status = BUS_FETCH; cpu_qs = QS_NOP; ad = 8'($urandom);   // T1
    clock1();
    clock1();                                                     // T2
    repeat ($urandom_range(2)) begin clock1(); n_waits++; end     // Tw
    bus_status = BUS_PASSIVE; ad = b;                             // data clock
    clock1();
    ad = 8'($urandom);                                            // T4
    clock1();
  endtask

  task automatic take(input int nbytes);
    bus_status = BUS_PASSIVE;
    cpu_qs = QS_FIRST; clock1();
    for (int k = 1; k < nbytes; k++) begin cpu_qs = QS_SUBSQ; clock1(); end
    cpu_qs = QS_NOP; clock1();
  endtask

  task automatic instr2(input logic [7:0] b0, input logic [7:0] b1);
    fetch(b0); fetch(b1); take(2);
  endtask

  task automatic jmp();
    instr2(8'hEB, 8'h00);
    cpu_qs = QS_EMPTY; clock1(); cpu_qs = QS_NOP; clock1();
  endtask

  task automatic wait_instr();
    int guard = 0;
    fetch(OP_WAIT); take(1);
    clock1();
    while (|busy && guard < 4000) begin clock1(); guard++; end
    check(guard < 4000, "WAIT released");
  endtask

  task automatic vector(input logic [3:0] k);
    jmp(); instr2(OP_ESC_DF, {4'hF, k});
  endtask

  task automatic fscalar();
    vector(4'hE);
    fetch(8'h90); take(1);          // the change takes effect in the next bus cycle
    check(!serial_mode && !parallel_mode, "FSCALAR returns to scalar mode");
    check(cop_ready == N'(1), "scalar: only 87-1 ready");
  endtask

  // FVECTOR-SQ, then k two-byte coprocessor instructions each with a WAIT;
  // exactly 87-1..87-k must run, in that order
  task automatic serial_run(input int k, input logic [7:0] opc, input logic [7:0] modrm,
                            input string what);
    exec_order.delete();
    vector(4'hF);
    check(serial_mode, {what, ": serial mode entered"});
    for (int j = 0; j < k; j++) begin
      instr2(opc, modrm);
      wait_instr();
    end
    check(exec_order.size() == k,
          $sformatf("%s: %0d executions, expected %0d", what, exec_order.size(), k));
    foreach (exec_order[j])
      check(exec_order[j] == j, $sformatf("%s: step %0d ran 87-%0d", what, j, exec_order[j] + 1));
    serial_runs++;
    fscalar();
    // the next coprocessor was handed the block's first instruction by the
    // parallel loading and is made ready by the hand-over once 87-k is done:
    // it starts that instruction when the JMP in front of FSCALAR is taken
    if (k < N) begin
      check(exec_order.size() == k + 1 && exec_order[k] == k,
            $sformatf("%s: 87-%0d starts the loaded instruction after the block", what, k + 1));
      if (exec_order.size() == k + 1) m_tail_start++;
    end
  endtask

  // one instruction in parallel mode: all N must start in the same clock
  task automatic parallel_op(input logic [7:0] b0, input logic [7:0] b1, input string what);
    int n_before = same_clock_all;
    exec_order.delete();
    instr2(b0, b1);
    wait_instr();
    check(same_clock_all == n_before + 1, {what, ": all coprocessors start together"});
    check(exec_order.size() == N, $sformatf("%s: %0d executions, expected %0d", what, exec_order.size(), N));
    parallel_ops++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; bus_status = BUS_PASSIVE; cpu_qs = QS_NOP; ad = '0; r88 = 1'b1;
    repeat (4) clock1();
    rst = 1'b0; clock1();

    // ---- A: three pairs, c = a + b ----------------------------------------
    serial_run(3, 8'hD9, 8'h07, "A load a");      // FLD dword [bx]
    serial_run(3, 8'hD9, 8'h07, "A load b");
    vector(4'hD);                                 // FVECTOR-OP
    check(parallel_mode, "A: parallel mode entered");
    parallel_op(8'hDE, 8'hC1, "A FADD");          // FADDP
    fscalar();
    serial_run(3, 8'hD9, 8'h17, "A store c");     // FST dword [bx]

    // ---- B: four elements, sqrt(tan(a + c)) -------------------------------
    serial_run(4, 8'hD9, 8'h07, "B load a");
    vector(4'hD);
    check(parallel_mode, "B: parallel mode entered");
    parallel_op(8'hD9, 8'h06, "B FLD constant");
    parallel_op(8'hDE, 8'hC1, "B FADD");
    parallel_op(8'hD9, 8'hF2, "B FPTAN");
    parallel_op(8'hD9, 8'hFA, "B FSQRT");
    fscalar();
    serial_run(4, 8'hD9, 8'h17, "B store");

    check(serial_runs == 5 && parallel_ops == 5, "every step of both programs ran");
    check(n_waits > 0, "wait states inserted");
    check(m_tail_start == serial_runs, $sformatf("tail starts %0d", m_tail_start));
    check(busy[3:0] == '0, $sformatf("87-1..87-4 idle at the end (%b)", busy));
    $display("workloads: serial runs=%0d parallel instructions=%0d tail starts=%0d clocks=%0d",
             serial_runs, parallel_ops, m_tail_start, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
