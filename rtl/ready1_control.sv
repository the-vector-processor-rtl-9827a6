// ready1_control: Ready control of the first 8087 (87-1).
//
// The first coprocessor works with the CPU exactly as in an ordinary PC, so
// its Ready follows the 8284's READY (r88) at all times except in serial
// mode: once c1 has marked the end of parallel loading, the fall of its
// BUSY (end of its load/store) pulls Ready low and holds the 87-1 in wait
// states until c1 drops on the return to scalar mode.
//   g     = not (c1 and not b1)   -- 87-1 active
//   ready = g and r88
// Combinational, as in the document's circuit.
module ready1_control (
  input  logic c1,
  input  logic b1,
  input  logic r88,
  output logic g,
  output logic ready
);

  assign g     = !(c1 && !b1);
  assign ready = g && r88;

endmodule
