// tb_parallel_exec_control: self-checking test of the Parallel Execution
// Control (Parallel Ready Control and Parallel Queue Status Control).
//
// Checks, clock by clock:
//   * DF FD (v3) sets PM1 at once, SP1 only on the following T22 strobe,
//     and PM2 (queue status to all 8087s) together with SP1;
//   * the first queue-empty code in parallel mode drops PM2 (Q52) while
//     SP1 stays high, and later queue-empty codes change nothing;
//   * SM1 clears PM1 and SP1; the next parallel episode starts cleanly;
//   * in serial mode (q31) T22 sets SP1 without PM1 and PM2 stays low;
//   * a queue-empty code before SP1 does not cut PM2 in advance.
module tb_parallel_exec_control;
  import vc_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic [1:0] cpu_qs;
  logic       v3, q31, t22, sm1;
  logic       pm1, sp1, pm2;

  int checks = 0, failures = 0;

  parallel_exec_control dut (.*);

  always #5 clk = !clk;

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

  task automatic pulse_v3(); v3 = 1; step(); v3 = 0; endtask
  task automatic pulse_t22(); t22 = 1; step(); t22 = 0; endtask
  task automatic pulse_sm1(); sm1 = 1; t22 = 1; step(); sm1 = 0; t22 = 0; endtask
  task automatic qs(input qs_e c); cpu_qs = c; step(); cpu_qs = QS_NOP; endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cpu_qs = QS_NOP; v3 = 0; q31 = 0; t22 = 0; sm1 = 0;
    repeat (3) step();
    rst = 0; step();
    check(!pm1 && !sp1 && !pm2, "reset: scalar");

    for (int ep = 0; ep < 2; ep++) begin
      pulse_t22();
      check(!sp1, "T22 alone does not enter vector mode");
      qs(QS_EMPTY);                      // JMP before DF FD
      pulse_v3();
      check(pm1 && !sp1 && !pm2, "PM1 set, SP1 waits for T22");
      qs(QS_FIRST); qs(QS_SUBSQ);        // CPU consumes DF FD
      check(!sp1 && !pm2, "still no SP1 before T22");
      repeat (2) step();
      t22 = 1; #1;
      check(!sp1, "SP1 registered on T22");
      step(); t22 = 0;
      check(sp1 && pm2, "SP1 and PM2 after T22");
      qs(QS_FIRST); qs(QS_SUBSQ); qs(QS_NOP);
      check(pm2, "PM2 held through ordinary queue codes");
      qs(QS_EMPTY);                      // JMP before DF FE
      check(sp1 && pm1 && !pm2, "queue-empty drops PM2 but not SP1");
      qs(QS_EMPTY); qs(QS_FIRST);
      check(!pm2, "PM2 stays low");
      pulse_sm1();
      check(!pm1 && !sp1 && !pm2, "SM1 returns to scalar");
      step();
    end

    // serial mode: SP1 from q31, no PM1/PM2
    q31 = 1; step();
    check(!sp1, "serial flag alone does not set SP1");
    pulse_t22();
    check(sp1 && !pm1 && !pm2, "serial: SP1 on T22, no PM2");
    pulse_sm1(); q31 = 0;
    check(!sp1, "serial: SP1 cleared by SM1");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
