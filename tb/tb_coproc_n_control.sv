// tb_coproc_n_control: self-checking test of the generalized Ready and
// queue-status control of one 87-n coprocessor (n >= 3).
//
// Follows the serial-mode hand-over: the 87-n waits (Ready low, queue
// status 00 except queue-empty) until the previous coprocessor is done,
// becomes active (Ready = R-88, queue status passed), raises BUSY, and
// when BUSY falls drops P(n) and returns to wait. Also checks scalar mode
// (always waiting), parallel loading (SP1 without C1), parallel mode (PM2),
// that a BUSY seen while C1 is low is forgotten, and that the "finished"
// state is cleared with C1.
module tb_coproc_n_control;
  import vc_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       c1, sp1, pm2, r88, prev_done, busy;
  logic [1:0] cpu_qs;
  logic       p_n, ready;
  logic [1:0] qs_out;

  int checks = 0, failures = 0;

  coproc_n_control dut (.*);

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

  // expected: Ready level (with R-88 high) and whether QS passes
  task automatic expect_state(input bit rdy, input bit qs_on, input string tag);
    r88 = 1; #1;
    check(ready == rdy, $sformatf("%s: Ready", tag));
    r88 = 0; #1;
    check(!ready, $sformatf("%s: Ready low with R-88 low", tag));
    r88 = 1;
    for (int c = 0; c < 4; c++) begin
      cpu_qs = 2'(c); #1;
      check(qs_out == (qs_on ? 2'(c) : (2'(c) == QS_EMPTY ? QS_EMPTY : QS_NOP)),
            $sformatf("%s: QS code %0d", tag, c));
    end
    cpu_qs = QS_NOP;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; c1 = 0; sp1 = 0; pm2 = 0; r88 = 1; prev_done = 0; busy = 0; cpu_qs = QS_NOP;
    repeat (3) step();
    rst = 0; step();

    expect_state(0, 0, "scalar");
    busy = 1; step(); busy = 0; step();
    check(p_n, "busy with C1 low not remembered");

    for (int ep = 0; ep < 2; ep++) begin
      sp1 = 1; #1;
      expect_state(1, 0, "parallel loading");
      step(); c1 = 1; #1;
      expect_state(0, 0, "waiting for previous");
      step(); step();
      prev_done = 1; #1;
      expect_state(1, 1, "active");
      check(p_n, "P(n) high before it ran");
      step();
      busy = 1; step(); step();
      expect_state(1, 1, "executing");
      busy = 0; #1;
      check(!p_n, "P(n) low after BUSY falls");
      expect_state(0, 0, "finished");
      step(); step();
      check(!p_n, "P(n) stays low");
      expect_state(0, 0, "finished, later");
      c1 = 0; sp1 = 0; prev_done = 0; step();
      check(p_n, "P(n) released when C1 drops");
      expect_state(0, 0, "scalar after serial");
    end

    // parallel mode
    sp1 = 1; pm2 = 1; #1;
    expect_state(1, 1, "parallel mode");
    pm2 = 0; #1;
    expect_state(1, 0, "parallel mode after queue cut");
    sp1 = 0; #1;
    expect_state(0, 0, "after parallel mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
