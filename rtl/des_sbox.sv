// des_sbox: DES substitution box S<INDEX>, a 64-entry by 4-bit look-up table.
//
// The 6-bit address is one group of the expanded, key-mixed right half. Its
// first and last bits (addr[5], addr[0]) select one of four rows and the
// middle four bits (addr[4:1]) one of sixteen columns. The tables are the
// standard DES ones (des_pkg).
//
// Interface: addr (6 bits) in, dout (4 bits) out.
// Timing: purely combinational ROM.
module des_sbox
  import des_pkg::*;
#(
  parameter int unsigned INDEX = 1  // 1..8
) (
  input  logic [5:0] addr,
  output logic [3:0] dout
);

  logic [1:0] row;
  logic [3:0] col;

  assign row  = {addr[5], addr[0]};
  assign col  = addr[4:1];
  assign dout = SBOX_T[INDEX-1][{row, col}];

endmodule
