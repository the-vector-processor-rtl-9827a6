// ready2_control: Ready control of the second 8087 (87-2).
//
// The 87-2 is held in wait states in scalar mode. Its Ready follows the
// 8284's READY (r88):
//   * while sp1 is high and c1 low: the parallel loading of the first
//     instruction after a serial vector instruction, and all of parallel
//     mode;
//   * in serial mode after c1, from the end of the 87-1's instruction (b1
//     low) until the end of its own (act = c1 and sm2 and not b1).
// q51 is set while the 87-2 is busy and cleared whenever c1 is low; sm2 goes
// low when the 87-2's BUSY falls with q51 set, i.e. when it has finished its
// load/store. sm2 low is what activates the 87-3.
//
// Timing: q51 is registered on the system clock (the document presets it
// asynchronously from BUSY); everything else is combinational, as in the
// document's circuit.
module ready2_control (
  input  logic clk,
  input  logic rst,
  input  logic sp1,
  input  logic c1,
  input  logic r88,
  input  logic b1,
  input  logic b2,
  output logic sm2,
  output logic act,
  output logic ready
);

  logic q51;

  assign sm2   = !(q51 && !b2);
  assign act   = c1 && sm2 && !b1;
  assign ready = r88 && ((sp1 && !c1) || act);

  always_ff @(posedge clk) begin
    if (rst || !c1) q51 <= 1'b0;
    else if (b2)    q51 <= 1'b1;
  end

endmodule
