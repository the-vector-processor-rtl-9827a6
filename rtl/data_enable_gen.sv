// data_enable_gen: Data Enable Generator of the vector instruction decoder.
//
// The opcode byte of an instruction fetch is valid on AD7..AD0 in the clock
// just before T4 (T3, or the last wait clock), which is the first clock after
// the fetch status s has returned to passive. This block turns the falling
// edge of s into two one-clock strobes:
//   t31 - the data-valid clock (the document's T31),
//   cl1 - the following clock, T4, which ends the look-up of this cycle.
// q21 remembers that a monitored fetch is in progress, q22 that t31 has been
// given; cl1 clears both. The flip-flop names and their roles follow the
// document; the exact gating is this design's own (its circuit is not
// reproduced here).
module data_enable_gen (
  input  logic clk,
  input  logic rst,
  input  logic s,     // monitored fetch status
  output logic t31,   // data on the bus this clock
  output logic cl1    // T4 of the monitored cycle
);

  logic q21, q22;

  assign t31 = q21 && !s && !q22;
  assign cl1 = q22;

  always_ff @(posedge clk) begin
    if (rst || cl1) begin
      q21 <= 1'b0;
      q22 <= 1'b0;
    end else begin
      if (s)   q21 <= 1'b1;
      if (t31) q22 <= 1'b1;
    end
  end

endmodule
