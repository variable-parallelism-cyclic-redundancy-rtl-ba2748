// crc24_pkg: constants and types shared by the variable-parallelism CRC-24b circuit.
//
// The LTE CRC-24b generator is g(x) = x^24 + x^23 + x^6 + x^5 + x + 1. Its 24 low
// coefficients form the feedback mask POLY24 (bits 23, 6, 5, 1 and 0 set); the x^24 term
// is implicit. The division register follows the serial rule: shift the remainder one
// place towards the MSB, put the new data bit in bit 0, and if the bit that left bit 23
// was 1, XOR in POLY24. Data words are MSB-aligned and their most significant bit is
// shifted in first.
//
// par_e encodes the parallelism of a data word (8, 16, 24 or 32 bits per cycle). The
// encoding is this design's choice. crc24_step/crc24_unfold are the serial rule and its
// unfolding over n bits; the P-32 network is built from them.
package crc24_pkg;

  localparam int unsigned M = 24;                       // remainder length
  localparam logic [M-1:0] POLY24 = 24'h80_0063;        // x^23 + x^6 + x^5 + x + 1

  typedef enum logic [1:0] {
    PAR_8  = 2'd0,
    PAR_16 = 2'd1,
    PAR_24 = 2'd2,
    PAR_32 = 2'd3
  } par_e;

  // Control that travels with every data word.
  typedef struct packed {
    logic valid;   // word present this cycle
    logic first;   // first word of a frame: division starts from a zero remainder
    logic last;    // last word of a frame: the remainder after it is the result
    par_e par;     // number of valid MSB-aligned bits in the word
  } word_ctl_t;

  // Number of data bits of a parallelism code.
  function automatic int unsigned par_bits(par_e p);
    case (p)
      PAR_8:   return 8;
      PAR_16:  return 16;
      PAR_24:  return 24;
      default: return 32;
    endcase
  endfunction

  // One step of the serial division (one bit shifted in).
  function automatic logic [M-1:0] crc24_step(logic [M-1:0] rm, logic din);
    logic [M-1:0] nxt;
    nxt = {rm[M-2:0], din};
    if (rm[M-1]) nxt = nxt ^ POLY24;
    return nxt;
  endfunction

  // n steps of the serial division, data taken from the MSB of a 32-bit word downwards.
  function automatic logic [M-1:0] crc24_unfold(logic [M-1:0] rm, logic [31:0] data,
                                                int unsigned n);
    logic [M-1:0] r;
    r = rm;
    for (int unsigned i = 0; i < 32; i++) begin
      if (i < n) r = crc24_step(r, data[31-i]);
    end
    return r;
  endfunction

endpackage
