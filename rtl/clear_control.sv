// clear_control: Clearing and Control of the vector instruction decoder.
//
// A divide-by-two counter q1 toggles at the start of each monitored fetch
// cycle (rising edge of s), so q1 is 1 during the first cycle of a look-up
// and 0 during the second. In the T4 clock of a cycle (cl1) the block issues
//   clr1 - end of the first cycle when no DF was seen, or end of the second
//          cycle when DF was seen; clears the fetch monitor and q1,
//   clr2 - end of the second cycle after DF; clears the DF flag q12.
// Thus a look-up lasts one bus cycle when the first byte is not DF and two
// when it is. Behaviour as described in the document; the strobes are
// active-high one-clock pulses here instead of active-low levels.
module clear_control (
  input  logic clk,
  input  logic rst,
  input  logic s,     // monitored fetch status
  input  logic cl1,   // T4 strobe
  input  logic q12,   // DF seen
  output logic q1,    // bus-cycle counter
  output logic clr1,
  output logic clr2
);

  logic s_d;

  assign clr2 = cl1 && !q1 && q12;
  assign clr1 = (cl1 && q1 && !q12) || clr2;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_d <= 1'b0;
      q1  <= 1'b0;
    end else begin
      s_d <= s;
      if (clr1)          q1 <= 1'b0;
      else if (s && !s_d) q1 <= !q1;
    end
  end

endmodule
