// tb_seq_ls_control: self-checking test of the Sequential LOAD/STORE
// Control (Main Controller with its T22 Clock Generator, 87-1 and 87-2
// Ready and Queue Status Controls).
//
// The test plays one serial-mode episode as the decoder and the
// coprocessors would present it, and checks the Ready and queue-status lines
// of the 87-1 and 87-2 at each step against the expected sequence:
//   scalar: 87-1 follows R-88 and the CPU queue status, 87-2 held in wait;
//   after DF FF and SP1: 87-2 Ready follows R-88 (parallel loading);
//   WAIT byte: C1 rises, 87-2 back to wait while 87-1 is busy;
//   87-1 BUSY falls: 87-1 to wait (queue status 00 except queue-empty),
//   87-2 active; 87-2 BUSY falls: SM2 low, 87-2 to wait;
//   DF FE: SM1 on the T2 clock of the next bus cycle, back to scalar.
// It also checks that T22 is exactly the second clock of the first bus
// cycle after a data strobe, and only that one.
module tb_seq_ls_control;
  import vc_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic [2:0] bus_status;
  logic [1:0] cpu_qs;
  logic [7:0] ad;
  logic       t31, v1, v2, r88, b1, b2, sp1, pm2;
  logic       t22, q31, c1, sm1, sm2, ready1, ready2;
  logic [1:0] qs1, qs2;

  int checks = 0, failures = 0;
  int sm1_count = 0;

  seq_ls_control dut (.*);

  always #5 clk = !clk;
  always @(negedge clk) if (sm1) sm1_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic step();
    @(posedge clk); #1;
  endtask

  // queue-status pass-through checks for one coprocessor output:
  // active -> every code passes; waiting -> only queue-empty passes
  task automatic check_qs(input bit active1, input bit active2, input string tag);
    for (int c = 0; c < 4; c++) begin
      cpu_qs = 2'(c);
      #1;
      check(qs1 == (active1 ? 2'(c) : (2'(c) == QS_EMPTY ? QS_EMPTY : QS_NOP)),
            $sformatf("%s: 87-1 QS for code %0d", tag, c));
      check(qs2 == (active2 ? 2'(c) : (2'(c) == QS_EMPTY ? QS_EMPTY : QS_NOP)),
            $sformatf("%s: 87-2 QS for code %0d", tag, c));
    end
    cpu_qs = QS_NOP;
  endtask

  task automatic check_ready(input bit e1, input bit e2, input string tag);
    r88 = 1'b1; #1;
    check(ready1 == e1, $sformatf("%s: 87-1 Ready", tag));
    check(ready2 == e2, $sformatf("%s: 87-2 Ready", tag));
    r88 = 1'b0; #1;
    check(!ready1 && !ready2, $sformatf("%s: Ready low while R-88 low", tag));
    r88 = 1'b1;
  endtask

  // data strobe with a byte on the bus; optional decoded vector instruction
  task automatic strobe(input logic [7:0] b, input bit is_v1, input bit is_v2);
    ad = b; t31 = 1'b1; v1 = is_v1; v2 = is_v2;
    step();
    t31 = 1'b0; v1 = 1'b0; v2 = 1'b0; ad = 8'($urandom);
    step();   // T4
  endtask

  // a memory-read bus cycle; returns the clock (1 = T1) in which t22 was
  // seen, 0 if none, -1 if more than one
  task automatic bus_cycle(output int t22_at);
    t22_at = 0;
    for (int k = 1; k <= 4; k++) begin
      bus_status = (k <= 2) ? BUS_MEMRD : BUS_PASSIVE;
      #1;
      if (t22) t22_at = (t22_at == 0) ? k : -1;
      step();
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int at;

  initial begin
    rst = 1'b1; bus_status = BUS_PASSIVE; cpu_qs = QS_NOP; ad = '0;
    t31 = 0; v1 = 0; v2 = 0; r88 = 1; b1 = 0; b2 = 0; sp1 = 0; pm2 = 0;
    repeat (3) step();
    rst = 1'b0;
    step();

    // scalar mode
    check(!q31 && !c1 && !sm1 && sm2, "scalar: flags clear");
    check_ready(1, 0, "scalar");
    check_qs(1, 0, "scalar");
    b1 = 1'b1; #1;  // 87-1 busy in scalar mode changes nothing
    check_ready(1, 0, "scalar busy");
    b1 = 1'b0;

    // T22: no strobe, no T22
    bus_cycle(at);
    check(at == 0, "no T22 without a data strobe");
    // strobe, then T22 in T2 of the next bus cycle only
    strobe(8'h90, 0, 0);
    step();
    bus_cycle(at);
    check(at == 2, $sformatf("T22 in T2 (seen in clock %0d)", at));
    bus_cycle(at);
    check(at == 0, "T22 only once per strobe");

    // DF FF: serial mode
    strobe(8'hFF, 1, 0);
    check(q31 && !c1, "serial flag set by DF FF");
    bus_cycle(at);
    check(at == 2, "T22 after DF FF");
    check(sm1_count == 0, "no SM1 in serial entry");
    sp1 = 1'b1;  // set by the Parallel Ready Control on that T22
    #1;
    check_ready(1, 1, "parallel loading");
    check_qs(1, 0, "parallel loading");

    // 87-1 starts executing the loaded instruction
    b1 = 1'b1;
    strobe(8'hD9, 0, 0);
    check(!c1, "C1 not set by a coprocessor opcode");
    strobe(8'h9B, 0, 0);
    check(c1, "C1 set by WAIT");
    check_ready(1, 0, "87-1 executing");
    check_qs(1, 0, "87-1 executing");

    // 87-1 finished: it waits, 87-2 becomes active
    repeat (3) step();
    b1 = 1'b0; #1;
    check_ready(0, 1, "87-2 turn");
    check_qs(0, 1, "87-2 turn");
    check(sm2, "SM2 high before 87-2 ran");

    // 87-2 busy, then finished
    b2 = 1'b1; step(); step();
    check_ready(0, 1, "87-2 executing");
    b2 = 1'b0; #1;
    check(!sm2, "SM2 low once 87-2 finished");
    check_ready(0, 0, "87-2 finished");
    check_qs(0, 0, "87-2 finished");
    step();
    check(!sm2, "SM2 stays low");

    // DF FE: back to scalar on the next T2
    strobe(8'hFE, 0, 1);
    check(q31 && c1, "still serial until T22");
    bus_status = BUS_MEMRD; #1;
    check(!sm1, "SM1 not in T1"); step();
    check(sm1, "SM1 in T2"); step();
    bus_status = BUS_PASSIVE; #1;
    check(!sm1, "SM1 one clock"); step();
    sp1 = 1'b0;  // cleared by SM1 in the Parallel Ready Control
    step();
    check(!q31 && !c1 && sm2, "scalar again: flags clear");
    check_ready(1, 0, "scalar again");
    check_qs(1, 0, "scalar again");
    check(sm1_count == 1, "exactly one SM1");

    // parallel mode as presented by the Parallel Execution Control
    sp1 = 1'b1; pm2 = 1'b1; #1;
    check_ready(1, 1, "parallel mode");
    check_qs(1, 1, "parallel mode");
    pm2 = 1'b0; #1;
    check_qs(1, 0, "parallel mode after Q52");
    sp1 = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
