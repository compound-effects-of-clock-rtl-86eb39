// AES S-box (SubBytes for one byte) as a 256-entry constant ROM.
// The table is computed at elaboration by aes_pkg from the S-box definition.
// Purely combinational: out_byte follows in_byte in the same cycle.
module aes_sbox (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);
  import aes_pkg::*;

  assign out_byte = SBOX[in_byte];

endmodule
