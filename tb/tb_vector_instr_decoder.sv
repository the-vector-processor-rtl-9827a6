// tb_vector_instr_decoder: self-checking test of the Vector Instructions
// Decoder and its five parts (fetch monitor, data enable generator, DF
// monitor, clearing and control, subsequent byte decoder).
//
// A small 8088 bus model runs instruction-fetch cycles: T1 and T2 (and any
// wait clocks) with fetch status, then the clock before T4 with passive
// status and the opcode byte on AD7..AD0, then T4. The test checks that a
// vector instruction DF Fk is reported on vec_op[k] in exactly the data
// clock of its second byte, only when it is the first thing fetched after a
// queue-empty code (or while the serial flag is set), and never otherwise;
// and that t31 falls in the data clock of every monitored fetch.
module tb_vector_instr_decoder;
  import vc_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [1:0]  cpu_qs;
  logic [2:0]  bus_status;
  logic [7:0]  ad;
  logic        q31;
  logic        t31;
  logic [15:0] vec_op;

  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0;
  int t31_seen = 0;

  vector_instr_decoder dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // count every vec_op pulse, sampled mid-cycle
  always @(negedge clk) if (!rst) begin
    if (vec_op != '0) pulses++;
    if (t31) t31_seen++;
  end

  task automatic idle(input int n);
    repeat (n) begin
      bus_status = BUS_PASSIVE; cpu_qs = QS_NOP; ad = 8'($urandom);
      @(posedge clk); #1;
    end
  endtask

  task automatic qs_empty();
    bus_status = BUS_PASSIVE; cpu_qs = QS_EMPTY; ad = 8'($urandom);
    @(posedge clk); #1;
    cpu_qs = QS_NOP;
  endtask

  // one instruction fetch; exp_k < 0: no vector instruction expected in
  // this cycle, otherwise vec_op must be one-hot at bit exp_k in the data
  // clock. exp_t31: whether the cycle is monitored.
  task automatic fetch(input logic [7:0] b, input int waits, input int exp_k,
                       input bit exp_t31);
    bus_status = BUS_FETCH; ad = 8'($urandom);           // T1
    @(posedge clk); #1;
    ad = 8'($urandom);                                     // T2
    @(posedge clk); #1;
    repeat (waits) begin @(posedge clk); #1; end           // Tw
    bus_status = BUS_PASSIVE; ad = b;                      // T3: data
    @(negedge clk);
    check(t31 == exp_t31, $sformatf("t31 in data clock of %h", b));
    if (exp_k < 0) check(vec_op == '0, $sformatf("no vector op on %h", b));
    else begin
      check(vec_op == 16'(1) << exp_k, $sformatf("vector op %0d on %h", exp_k, b));
      exp_pulses++;
    end
    @(posedge clk); #1;
    check(t31 == 1'b0, "t31 one clock long");
    ad = 8'($urandom);                                     // T4
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; q31 = 1'b0; cpu_qs = QS_NOP; bus_status = BUS_PASSIVE; ad = '0;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    idle(2);

    // 1. every vector code after a queue-empty, no wait states
    for (int k = 0; k < 16; k++) begin
      qs_empty(); idle(1);
      fetch(OP_ESC_DF, 0, -1, 1);
      fetch({4'hF, 4'(k)}, 0, k, 1);
      fetch(8'h90, 0, -1, 0);           // next byte no longer monitored
      idle(2);
    end

    // 2. DF FE without a queue-empty code: ignored
    fetch(OP_ESC_DF, 0, -1, 0);
    fetch(8'hFE, 0, -1, 0);
    idle(2);

    // 3. first byte not DF: one monitored cycle, then nothing
    qs_empty(); idle(1);
    fetch(8'h90, 0, -1, 1);
    fetch(OP_ESC_DF, 0, -1, 0);
    fetch(8'hFE, 0, -1, 0);
    idle(2);

    // 4. DF followed by a byte outside F0..FF
    qs_empty();
    fetch(OP_ESC_DF, 1, -1, 1);
    fetch(8'hE5, 0, -1, 1);
    fetch(8'hFD, 0, -1, 0);
    idle(2);

    // 5. wait states in both cycles
    qs_empty(); idle(3);
    fetch(OP_ESC_DF, 2, -1, 1);
    fetch(8'hFD, 3, 13, 1);
    idle(2);

    // 6. data byte DF in a non-fetch bus cycle is not a vector instruction
    qs_empty();
    bus_status = BUS_MEMRD; @(posedge clk); #1; @(posedge clk); #1;
    bus_status = BUS_PASSIVE; ad = OP_ESC_DF; @(posedge clk); #1; @(posedge clk); #1;
    fetch(OP_ESC_DF, 0, -1, 1);
    fetch(8'hFF, 0, 15, 1);
    idle(2);

    // 7. serial flag set: every fetch is monitored, no queue-empty needed
    q31 = 1'b1;
    fetch(8'hD9, 0, -1, 1);
    fetch(8'h9B, 0, -1, 1);
    fetch(OP_ESC_DF, 0, -1, 1);
    fetch(8'hFE, 0, 14, 1);
    fetch(8'hFE, 0, -1, 1);
    q31 = 1'b0;
    idle(2);

    // 8. reset in the middle of a look-up
    qs_empty();
    fetch(OP_ESC_DF, 0, -1, 1);
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    fetch(8'hFF, 0, -1, 0);
    idle(2);

    // 9. first byte differs from DF only in bit 7 (5F) or bit 0 (DE)
    qs_empty();
    fetch(8'h5F, 0, -1, 1);
    fetch(8'hFF, 0, -1, 0);
    idle(2);
    qs_empty();
    fetch(8'hDE, 0, -1, 1);
    fetch(8'hFE, 0, -1, 0);
    idle(2);

    check(pulses == exp_pulses, $sformatf("pulse count %0d expected %0d", pulses, exp_pulses));
    check(t31_seen > 40, "t31 strobes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
