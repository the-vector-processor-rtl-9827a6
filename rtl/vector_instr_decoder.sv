// vector_instr_decoder: Vector Instructions Decoder (VID).
//
// Recognises the sixteen vector instructions DF F0..DF FF in the 8088's
// instruction stream. After every queue-empty code the Instruction Fetch
// Monitor arms the decoder; the Data Enable Generator marks the clock in
// which each fetched byte is on the bus (t31); the DF monitor checks the
// first byte; the Subsequent Byte Decoder decodes the second; Clearing and
// Control returns everything to idle after one bus cycle (no DF) or two.
// While the serial-mode flag q31 is high every instruction fetch is
// monitored, so t31 also marks bytes for the Main Controller's WAIT search.
//
// Interface: vec_op is a one-hot pulse, one clock long, in the data clock of
// the second opcode byte. The five-block structure is the document's.
module vector_instr_decoder (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  cpu_qs,
  input  logic [2:0]  bus_status,
  input  logic [7:0]  ad,
  input  logic        q31,
  output logic        t31,
  output logic [15:0] vec_op
);

  logic s, q11, cl1, q1, q12, clr1, clr2;

  ifetch_monitor u_ifm (
    .clk, .rst, .cpu_qs, .bus_status, .q31, .clr1, .s, .q11
  );

  data_enable_gen u_deg (.clk, .rst, .s, .t31, .cl1);

  df_monitor u_dfm (.clk, .rst, .ad, .q1, .t31, .clr2, .q12);

  clear_control u_cc (.clk, .rst, .s, .cl1, .q12, .q1, .clr1, .clr2);

  subsequent_byte_decoder u_sbd (.ad, .q12, .q1, .t31, .vec_op);

endmodule
