// crc24_check: remainder check used for turbo-decoder early stopping.
//
// When a frame's remainder is ready (res_valid), compares it with the expected value
// and reports a match; the decoder can stop iterating on a match. The expected value is
// an input so that either check works: the remainder of the data bits against the
// received CRC bits (the comparison the document describes), or, when the 24 CRC bits
// of an LTE frame are divided too, the remainder against zero.
//
// Interface: combinational; crc_ok and crc_fail are valid in the cycle res_valid is high
// and are low otherwise. The comparison is the document's; the two flags are this
// design's choice.
module crc24_check
  import crc24_pkg::*;
(
  input  logic         res_valid,
  input  logic [M-1:0] rem,        // final remainder
  input  logic [M-1:0] expected,   // received CRC, or zero
  output logic         crc_ok,     // remainder matches: frame correct
  output logic         crc_fail    // remainder differs: more iterations needed
);

  logic match;

  always_comb begin
    match    = (rem == expected);
    crc_ok   = res_valid && match;
    crc_fail = res_valid && !match;
  end

endmodule
