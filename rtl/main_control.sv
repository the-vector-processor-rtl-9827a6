// main_control: Control Block of the Main Controller (Sequential
// LOAD/STORE Control).
//
// Serial mode is entered with the vector instruction DF FF (v1), which sets
// the serial flag q31. While q31 is high every fetched byte is offered on
// t31 and the first WAIT byte (9B) sets c1: it marks the end of the first
// coprocessor instruction after the vector instruction, which all the
// 8087s have copied into their queues in parallel. DF FE (v2) sets q42; the
// T2 clock of the next bus cycle (t22) then gives the return-to-scalar
// strobe sm1, which clears q31, c1 and q42 here and the parallel-mode flags
// elsewhere.
//
// The roles of q31, c1 (Q32), q42 and sm1 are the document's. Taking the
// first 9B after DF FF, and the active-high sm1 pulse (the document's SM1
// is active low), are this design's choices.
module main_control
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] ad,
  input  logic       t31,
  input  logic       t22,
  input  logic       v1,   // DF FF decoded
  input  logic       v2,   // DF FE decoded
  output logic       q31,  // serial mode
  output logic       c1,   // parallel loading finished
  output logic       sm1   // return to scalar mode (one clock)
);

  logic q42;

  assign sm1 = q42 && t22;

  always_ff @(posedge clk) begin
    if (rst || sm1) begin
      q31 <= 1'b0;
      c1  <= 1'b0;
      q42 <= 1'b0;
    end else begin
      if (v1) q31 <= 1'b1;
      if (v2) q42 <= 1'b1;
      if (q31 && t31 && ad == OP_WAIT) c1 <= 1'b1;
    end
  end

endmodule
