// crc24_xor_p32: combinational P-32 extension of the CRC-24b XOR network.
//
// Computes the remainder after 32 data bits, rd[31] divided first, from the current
// remainder c. The function is the serial division unfolded 32 times; it is written
// here as that unfolding (crc24_unfold from crc24_pkg), which elaboration turns into a
// fixed XOR network: each output bit is the XOR of a constant subset of rd and c. That
// the P-32 mode exists, that rd grows to 32 bits and that it costs roughly 54 extra
// XORs with a 6-level critical path is the document's; the document does not print the
// P-32 equations, so the gate-level sharing with the P-8/16/24 network is left to
// logic synthesis in this design.
//
// Interface: purely combinational, no clock.
module crc24_xor_p32
  import crc24_pkg::*;
(
  input  logic [31:0]  rd,     // 32-bit data register
  input  logic [M-1:0] c,      // current remainder
  output logic [M-1:0] rm32    // remainder after rd[31:0]
);

  always_comb rm32 = crc24_unfold(c, rd, 32);

endmodule
