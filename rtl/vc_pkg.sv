// vc_pkg: codes shared by the Vector Controller blocks.
//
// The 8088 announces each bus cycle on its three status lines S2..S0 and
// reports instruction-queue activity on QS1..QS0. The Vector Controller
// decodes both, and recognises vector instructions by their two opcode
// bytes: an escape byte DF followed by F0..FF. Three of the sixteen codes are
// used (FD parallel, FE scalar, FF serial); WAIT (9B) closes the parallel
// loading phase of serial mode. All values below are those of the 8088/8087
// bus and instruction set.
package vc_pkg;

  // Bus-cycle status {S2,S1,S0}
  typedef enum logic [2:0] {
    BUS_INTA    = 3'b000,
    BUS_IORD    = 3'b001,
    BUS_IOWR    = 3'b010,
    BUS_HALT    = 3'b011,
    BUS_FETCH   = 3'b100,
    BUS_MEMRD   = 3'b101,
    BUS_MEMWR   = 3'b110,
    BUS_PASSIVE = 3'b111
  } bus_status_e;

  // Queue status {QS1,QS0}
  typedef enum logic [1:0] {
    QS_NOP   = 2'b00,
    QS_FIRST = 2'b01,
    QS_EMPTY = 2'b10,
    QS_SUBSQ = 2'b11
  } qs_e;

  localparam logic [7:0] OP_ESC_DF = 8'hDF;  // first byte of every vector instruction
  localparam logic [3:0] OP_HI_F   = 4'hF;   // high nibble of the second byte
  localparam logic [7:0] OP_WAIT   = 8'h9B;  // 8088 WAIT

  // Second-byte low nibbles of the vector instructions in use
  localparam int unsigned VEC_PARALLEL = 13;  // DF FD  FVECTOR-OP
  localparam int unsigned VEC_SCALAR   = 14;  // DF FE  FSCALAR
  localparam int unsigned VEC_SERIAL   = 15;  // DF FF  FVECTOR-SQ

endpackage
