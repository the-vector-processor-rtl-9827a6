// subsequent_byte_decoder: decodes the second byte of a vector instruction.
//
// When DF has been seen (q12) and the decoder is in the second fetch cycle of
// the look-up (q1 low), the byte on AD7..AD0 during the data clock t31 is
// checked for a high nibble of F and its low nibble is decoded one-of-16.
// vec_op[k] is a one-clock pulse for the vector instruction DF Fk; bits 13,
// 14 and 15 are the document's V3 (DF FD, parallel), V2 (DF FE, scalar) and
// V1 (DF FF, serial). Purely combinational. Outputs are active high here
// where the document's 4-to-16 decoder gives active-low outputs.
module subsequent_byte_decoder
  import vc_pkg::*;
(
  input  logic [7:0]  ad,
  input  logic        q12,
  input  logic        q1,
  input  logic        t31,
  output logic [15:0] vec_op
);

  logic en;
  assign en = q12 && !q1 && t31 && (ad[7:4] == OP_HI_F);

  always_comb begin
    vec_op = '0;
    if (en) vec_op[ad[3:0]] = 1'b1;
  end

endmodule
