// crc24_ref_pkg: reference models used by the CRC-24b testbenches.
//
// alg1_remainder is the bit-serial polynomial division exactly as the circuit's
// specification states it: a 25-bit vector c holds the remainder shifted left by one
// with the new frame bit in c[0]; when c[24] is 1 the generator (25 bits, 0x1800063)
// is XORed in. lte_parity is written independently of it, in the usual "augmented"
// LFSR form that yields the 24 parity bits an LTE transmitter appends (remainder of
// a(x)*x^24). Dividing data plus appended parity with alg1_remainder must give zero.
package crc24_ref_pkg;

  typedef bit bitq_t[$];

  localparam bit [24:0] GEN25 = 25'h180_0063;   // x^24+x^23+x^6+x^5+x+1

  function automatic bit [23:0] alg1_remainder(bitq_t bits, bit [23:0] start = '0);
    bit [24:0] c;
    bit [23:0] rm;
    rm = start;
    foreach (bits[i]) begin
      c = {rm, bits[i]};
      if (c[24]) c = c ^ GEN25;
      rm = c[23:0];
    end
    return rm;
  endfunction

  function automatic bit [23:0] lte_parity(bitq_t bits);
    bit [23:0] r;
    bit fb;
    r = '0;
    foreach (bits[i]) begin
      fb = bits[i] ^ r[23];
      r  = r << 1;
      if (fb) r = r ^ GEN25[23:0];
    end
    return r;
  endfunction

  // First n bits of a word, most significant first.
  function automatic bitq_t word_bits(bit [31:0] w, int unsigned msb, int unsigned n);
    bitq_t q;
    for (int unsigned i = 0; i < n; i++) q.push_back(w[msb-i]);
    return q;
  endfunction

endpackage
