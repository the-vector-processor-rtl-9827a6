// cop8087_model: behavioural stand-in for one 8087 coprocessor, only as far
// as the Vector Controller can see it. Not synthesizable intent; for
// testbenches only.
//
// * While its READY input is high it copies the opcode byte of every
//   instruction fetch whose first five bits are the escape code 11011 into a
//   one-instruction queue (DF is left out: in these tests DF only starts
//   vector instructions, which a real 8087 also ignores).
// * The queue-empty code on its QS inputs flushes the queue.
// * The queue-status code "first byte" with READY high and an instruction
//   queued starts execution: BUSY rises on the next clock for EXEC_CLKS
//   clocks (counting only clocks with READY high) and exec pulses once.
// The data-valid clock of a fetch is taken as the first clock with passive
// status after fetch status, as in the controller.
module cop8087_model
  import vc_pkg::*;
#(
  parameter int unsigned EXEC_CLKS = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] bus_status,
  input  logic [7:0] ad,
  input  logic       ready,
  input  logic [1:0] qs,
  output logic       busy,
  output logic       loaded,
  output logic       exec
);

  logic in_fetch;
  int unsigned cnt;

  assign exec = ready && qs_e'(qs) == QS_FIRST && loaded && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_fetch <= 1'b0;
      loaded   <= 1'b0;
      busy     <= 1'b0;
      cnt      <= 0;
    end else begin
      if (bus_status_e'(bus_status) == BUS_FETCH) in_fetch <= 1'b1;
      else if (in_fetch) begin
        in_fetch <= 1'b0;
        if (ready && ad[7:3] == 5'b11011 && ad != OP_ESC_DF) loaded <= 1'b1;
      end
      if (qs_e'(qs) == QS_EMPTY) loaded <= 1'b0;
      if (exec) begin
        loaded <= 1'b0;
        busy   <= 1'b1;
        cnt    <= EXEC_CLKS;
      end else if (busy && ready) begin
        if (cnt <= 1) busy <= 1'b0;
        cnt <= cnt - 1;
      end
    end
  end

endmodule
