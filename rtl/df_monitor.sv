// df_monitor: Data Line Monitor for "DF".
//
// Every vector instruction starts with the escape byte DF. In the data clock
// (t31) of the first monitored fetch cycle (q1 high) the low data lines are
// compared with DF; a match sets q12, which tells the Subsequent Byte Decoder
// to look at the next byte and tells Clearing and Control to keep the decoder
// armed for a second cycle. clr2 drops q12 after that second cycle.
//
// Timing: q12 rises at the clock edge ending t31. Matches the published
// circuit; the synchronous set/clear is this design's choice.
module df_monitor
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] ad,    // AD7..AD0
  input  logic       q1,    // first fetch cycle of the look-up
  input  logic       t31,   // data strobe
  input  logic       clr2,
  output logic       q12    // DF seen
);

  logic f;  // the document's preset term F (active high here)
  assign f = t31 && q1 && (ad == OP_ESC_DF);

  always_ff @(posedge clk) begin
    if (rst || clr2) q12 <= 1'b0;
    else if (f)      q12 <= 1'b1;
  end

endmodule
