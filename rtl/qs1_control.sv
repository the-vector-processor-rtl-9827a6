// qs1_control: queue-status control of the first 8087 (87-1).
//
// While the 87-1 is active (g high) it sees the CPU's queue status
// unchanged. In its wait state its QS inputs are held at 00 (no operation)
// so it takes nothing from its queue, except that the queue-empty code
// (QS1=1, QS0=0) is always passed, letting it flush its queue together with
// the CPU before scalar mode resumes.
//   QS0-1 = g and QS0
//   QS1-1 = (g or not QS0) and QS1
// Combinational, as in the document's circuit. cpu_qs and qs_out are
// {QS1,QS0}.
module qs1_control (
  input  logic       g,
  input  logic [1:0] cpu_qs,
  output logic [1:0] qs_out
);

  assign qs_out[0] = g && cpu_qs[0];
  assign qs_out[1] = (g || !cpu_qs[0]) && cpu_qs[1];

endmodule
