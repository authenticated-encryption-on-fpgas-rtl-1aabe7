// aes_sbox: the AES SubBytes S-box for one byte, as a 256-entry look-up table.
//
// The table is aes_pkg::SBOX, computed at elaboration from the S-box
// definition (inverse in GF(2^8) followed by the affine map). On an FPGA this
// maps onto LUTs, the look-up-table variant of SubBytes; a synthesis tool may
// equally place it in block RAM if a register is added after it. Purely
// combinational: out follows in within the same clock.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] in,
  output logic [7:0] out
);
  assign out = SBOX[in];
endmodule
