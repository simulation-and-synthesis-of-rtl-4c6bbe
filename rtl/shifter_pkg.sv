// shifter_pkg: operation codes shared by the reversible shifters and their
// testbenches.
//
// The shifter takes a two-bit select {H1,H0}. Each output bit is a 4:1
// multiplexer whose data input k is the one chosen when {H1,H0} = k, so the
// enum values below double as the multiplexer input indices.
//   00  transfer F to S unchanged
//   01  shift right (towards bit 0), serial input enters the top bit
//   10  shift left (towards bit N-1), serial input enters bit 0
//   11  S = 0, no transfer
// The code assignment is the function table of the shifter; bit 0 of the
// select is H0 and bit 1 is H1.
package shifter_pkg;

  typedef enum logic [1:0] {
    OP_TRANSFER = 2'b00,
    OP_SHR      = 2'b01,
    OP_SHL      = 2'b10,
    OP_ZERO     = 2'b11
  } shift_op_e;

endpackage
