// qs2_control: queue-status control of the second 8087 (87-2).
//
// The 87-2 sees the CPU's queue status only while it executes: in serial
// mode while act (c1 and sm2 and not b1) is high, and in parallel mode while
// pm (the Parallel Execution Control's PM2) is high. Otherwise its QS inputs
// are 00, except that the queue-empty code is always passed.
//   g     = act or pm
//   QS0-2 = g and QS0
//   QS1-2 = (g or not QS0) and QS1
// Combinational, as in the document's circuit. cpu_qs and qs_out are
// {QS1,QS0}.
module qs2_control (
  input  logic       act,
  input  logic       pm,
  input  logic [1:0] cpu_qs,
  output logic [1:0] qs_out
);

  logic g;
  assign g = act || pm;

  assign qs_out[0] = g && cpu_qs[0];
  assign qs_out[1] = (g || !cpu_qs[0]) && cpu_qs[1];

endmodule
