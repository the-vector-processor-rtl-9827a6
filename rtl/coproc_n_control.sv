// coproc_n_control: generalized Ready and queue-status control for the
// 87-n coprocessor, n >= 3.
//
// A copy of the 87-2 controls with the activation input changed. In serial
// mode the 87-n becomes active when the previous coprocessor has finished
// (prev_done, the document's P(n-1)-bar) and stays active until its own BUSY
// falls, which drops p_n; p_n low is the next coprocessor's prev_done. qn
// remembers that the 87-n has been busy and is cleared whenever c1 is low.
// In parallel mode sp1 and pm2 activate it like all the others.
//   act    = c1 and prev_done and p_n
//   ready  = r88 and ((sp1 and not c1) or act)
//   g      = act or pm2;  QS0-n = g and QS0;  QS1-n = (g or not QS0) and QS1
// The generalisation rule is the document's; its circuit is not reproduced.
module coproc_n_control (
  input  logic       clk,
  input  logic       rst,
  input  logic       c1,
  input  logic       sp1,
  input  logic       pm2,
  input  logic       r88,
  input  logic       prev_done,
  input  logic       busy,
  input  logic [1:0] cpu_qs,
  output logic       p_n,
  output logic       ready,
  output logic [1:0] qs_out
);

  logic qn, act, g;

  assign p_n   = !(qn && !busy);
  assign act   = c1 && prev_done && p_n;
  assign ready = r88 && ((sp1 && !c1) || act);
  assign g     = act || pm2;

  assign qs_out[0] = g && cpu_qs[0];
  assign qs_out[1] = (g || !cpu_qs[0]) && cpu_qs[1];

  always_ff @(posedge clk) begin
    if (rst || !c1) qn <= 1'b0;
    else if (busy)  qn <= 1'b1;
  end

endmodule
