// tb_vector_controller: end-to-end test of the Vector Controller at its
// default size (ten 8087s), running the element-wise program pattern of
// the design: serial load of one element into every coprocessor, parallel
// execution of an arithmetic instruction by all of them, serial store of
// the results, with scalar code before and after.
//
// The 8088 is a bus-cycle model: each instruction is fetched byte by byte
// (T1, T2 with fetch status, the opcode byte in the following clock, T4),
// then taken from the queue (queue status "first byte", then "subsequent
// byte" per further byte). A JMP ends with the queue-empty code. WAIT holds
// the CPU until every 8087's BUSY is low (BUSY lines taken as wired to
// TEST). The 8087s are cop8087_model instances with different execution
// times.
//
// Checked against the program, not against the controller's internals:
// which coprocessors execute each instruction and in what order (serial:
// 87-1, 87-2, ... 87-10, one after another; parallel: all ten in the same
// clock; scalar: only 87-1), the decoded vector instructions, and that every
// mechanism of the design happened at least once (mode entries and exits,
// parallel loading into all queues, each serial hand-over, the early
// queue-status cut in parallel mode, wait states, ignored vector codes
// without a preceding JMP, reserved codes).
module tb_vector_controller;
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
    cop8087_model #(.EXEC_CLKS(12 + 3 * i)) u_cop (
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

  // ---- record executions -------------------------------------------------
  int     exec_count [N];
  longint exec_cycle [N];
  int     exec_order [$];
  int     vec_seen   [16];
  int     same_clock_all = 0;  // clocks in which all N started together

  always @(negedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) if (exec[i]) begin
      exec_count[i]++;
      exec_cycle[i] = cyc;
      exec_order.push_back(i);
    end
    if (&exec) same_clock_all++;
    for (int k = 0; k < 16; k++) if (vec_op[k]) vec_seen[k]++;
  end

  // ---- mechanism counters ------------------------------------------------
  int m_serial_entry = 0, m_parallel_entry = 0, m_scalar_return = 0;
  int m_parallel_loading = 0, m_handover = 0, m_qs_cut = 0;
  int m_wait_state = 0, m_ignored_vec = 0, m_reserved = 0, m_r88_hold = 0;
  logic serial_d = 0, parallel_d = 0;

  always @(negedge clk) if (!rst) begin
    if (serial_mode && !serial_d) m_serial_entry++;
    if (parallel_mode && !parallel_d) m_parallel_entry++;
    if ((serial_d && !serial_mode) || (parallel_d && !parallel_mode)) m_scalar_return++;
    serial_d   = serial_mode;
    parallel_d = parallel_mode;
    // parallel mode, queue status withheld from 87-2..: the Q52 cut
    if (parallel_mode && cop_ready[1] && cpu_qs == QS_FIRST && cop_qs[1] == QS_NOP) m_qs_cut++;
  end

  // ---- 8088 bus model ------------------------------------------------------
  task automatic clock1();
    @(posedge clk); #1;
  endtask

  task automatic fetch(input logic [7:0] b, input int waits = 0);
    bus_status = BUS_FETCH; cpu_qs = QS_NOP; ad = 8'($urandom);   // T1
    clock1();
    clock1();                                                     // T2
    repeat (waits) clock1();                                      // Tw
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

  task automatic nop(); fetch(8'h90); take(1); endtask

  task automatic wait_instr();
    int guard = 0;
    fetch(OP_WAIT); take(1);
    clock1();
    while (|busy && guard < 2000) begin clock1(); guard++; end
    check(guard < 2000, "WAIT released");
  endtask

  task automatic vector(input logic [3:0] k);
    jmp(); instr2(OP_ESC_DF, {4'hF, k});
  endtask

  task automatic clear_log();
    exec_order.delete();
    for (int i = 0; i < N; i++) exec_count[i] = 0;
    same_clock_all = 0;
  endtask

  // serial load or store of one element per coprocessor
  task automatic serial_block(input logic [7:0] opc, input logic [7:0] modrm);
    bit all_loaded = 0;
    clear_log();
    vector(4'hF);                                   // FVECTOR-SQ
    check(serial_mode, "serial mode entered");
    for (int i = 0; i < N; i++) begin
      fetch(opc);
      if (i == 0) begin
        // first instruction after the vector instruction: copied into all
        all_loaded = &loaded;
        if (all_loaded) m_parallel_loading++;
        check(all_loaded, "first instruction loaded into every 8087");
      end
      fetch(modrm); take(2);
      wait_instr();
    end
    check(exec_order.size() == N, $sformatf("serial: %0d executions, expected %0d", exec_order.size(), N));
    foreach (exec_order[j]) begin
      check(exec_order[j] == j, $sformatf("serial order: step %0d ran 87-%0d", j, exec_order[j] + 1));
      if (j > 0 && exec_order[j] == j) m_handover++;
    end
    for (int i = 1; i < N; i++)
      check(exec_cycle[i] > exec_cycle[i-1], "serial: each starts after the previous");
    vector(4'hE);                                   // FSCALAR
    nop();
    check(!serial_mode && !parallel_mode, "scalar mode after serial block");
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; bus_status = BUS_PASSIVE; cpu_qs = QS_NOP; ad = '0; r88 = 1'b1;
    repeat (4) clock1();
    rst = 1'b0; clock1();

    // ---- scalar: only 87-1 works -----------------------------------------
    check(cop_ready == N'(1), "power-up: only 87-1 ready");
    clear_log();
    instr2(8'hD9, 8'h06); wait_instr();          // FLD
    check(exec_count[0] == 1 && exec_order.size() == 1, "scalar FLD on 87-1 only");

    // wait states in a fetch, and R-88 gating
    fetch(8'h90, 2); take(1); m_wait_state++;
    r88 = 1'b0; #1;
    check(cop_ready == '0, "R-88 low holds every 8087"); m_r88_hold++;
    r88 = 1'b1; clock1();

    // vector code without JMP in front: ignored
    instr2(OP_ESC_DF, 8'hFF);
    check(!serial_mode && vec_seen[15] == 0, "DF FF without JMP ignored"); m_ignored_vec++;
    nop();

    // reserved vector instruction: decoded, no mode change
    vector(4'h0); nop();
    check(vec_seen[0] == 1 && !serial_mode && !parallel_mode, "reserved DF F0 decoded, no effect");
    if (vec_seen[0] == 1) m_reserved++;

    // ---- serial load of ten elements ---------------------------------------
    serial_block(8'hD9, 8'h07);                  // FLD [bx]

    // ---- parallel: FADD on all ten -----------------------------------------
    clear_log();
    vector(4'hD);                                // FVECTOR-OP
    check(parallel_mode, "parallel mode entered");
    instr2(8'hD8, 8'hC1);                        // FADD
    wait_instr();
    check(same_clock_all == 1, "parallel: all ten start in the same clock");
    for (int i = 0; i < N; i++) check(exec_count[i] == 1, $sformatf("parallel: 87-%0d ran once", i + 1));
    instr2(8'hD9, 8'hFA); wait_instr();          // FSQRT
    check(same_clock_all == 2, "parallel: second instruction on all ten");
    jmp();
    // queue-empty has cut the queue status; the closing escape must not run
    instr2(OP_ESC_DF, 8'hFE);                    // FSCALAR
    nop();
    check(!parallel_mode && !serial_mode, "scalar after parallel");
    for (int i = 0; i < N; i++) check(!busy[i], "no 8087 left busy after parallel mode");
    check(cop_ready == N'(1), "scalar: only 87-1 ready again");

    // ---- serial store ------------------------------------------------------
    serial_block(8'hDD, 8'h17);                  // FST [bx]

    // ---- scalar again --------------------------------------------------------
    clear_log();
    instr2(8'hD9, 8'h06); wait_instr();
    check(exec_count[0] == 1 && exec_order.size() == 1, "scalar FLD on 87-1 only, afterwards");

    // ---- mechanisms ----------------------------------------------------------
    check(vec_seen[15] == 2 && vec_seen[14] == 3 && vec_seen[13] == 1, "vector instruction counts");
    check(m_serial_entry == 2,       $sformatf("serial entries %0d", m_serial_entry));
    check(m_parallel_entry == 1,     $sformatf("parallel entries %0d", m_parallel_entry));
    check(m_scalar_return == 3,      $sformatf("returns to scalar %0d", m_scalar_return));
    check(m_parallel_loading == 2,   $sformatf("parallel loadings %0d", m_parallel_loading));
    check(m_handover == 2 * (N - 1), $sformatf("serial hand-overs %0d", m_handover));
    check(m_qs_cut > 0,              $sformatf("queue-status cuts %0d", m_qs_cut));
    check(m_wait_state > 0 && m_r88_hold > 0 && m_ignored_vec > 0 && m_reserved > 0, "other mechanisms");
    $display("mechanisms: serial=%0d parallel=%0d scalar_return=%0d loading=%0d handover=%0d qs_cut=%0d wait=%0d r88=%0d ignored=%0d reserved=%0d",
             m_serial_entry, m_parallel_entry, m_scalar_return, m_parallel_loading, m_handover,
             m_qs_cut, m_wait_state, m_r88_hold, m_ignored_vec, m_reserved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
