// parallel_ready_control: Parallel Ready Control.
//
// DF FD (v3) sets the parallel-mode flag pm1. On the T2 clock (t22) of the
// next bus cycle, sp1 is set if either pm1 or the serial flag q31 is high;
// sp1 is what lets the 8284's READY through to the Ready input of every
// 8087 beyond the first. The return-to-scalar strobe sm1 clears both flags.
// Synchronising sp1 with T2 meets the 8087 Ready set-up and hold times.
// The roles of pm1 and sp1 are the document's; this block's gating is built
// from its description (its circuit is not reproduced).
module parallel_ready_control (
  input  logic clk,
  input  logic rst,
  input  logic v3,    // DF FD
  input  logic q31,   // serial mode
  input  logic t22,
  input  logic sm1,
  output logic pm1,
  output logic sp1
);

  always_ff @(posedge clk) begin
    if (rst || sm1) begin
      pm1 <= 1'b0;
      sp1 <= 1'b0;
    end else begin
      if (v3)                 pm1 <= 1'b1;
      if (t22 && (pm1 || q31)) sp1 <= 1'b1;
    end
  end

endmodule
