// crc24_rm_mux: parallelism multiplexer of the variable-parallelism CRC-24b circuit.
//
// Picks, among the remainders the XOR network computes in parallel, the one that
// matches the parallelism of the word now in r_d. The parallelism may change from one
// cycle to the next. With P32_EN = 0 there is no P-32 result; a PAR_32 code then
// selects the unchanged remainder c, so such a word is ignored (the top asserts that it
// never occurs). Selecting among the parallel results follows the document; the
// handling of an unsupported code is this design's choice.
//
// Interface: purely combinational.
module crc24_rm_mux
  import crc24_pkg::*;
#(
  parameter bit P32_EN = 1'b0
) (
  input  par_e         par,
  input  logic [M-1:0] c,       // current remainder
  input  logic [M-1:0] rm8,
  input  logic [M-1:0] rm16,
  input  logic [M-1:0] rm24,
  input  logic [M-1:0] rm32,    // unused when P32_EN = 0
  output logic [M-1:0] rm
);

  always_comb begin
    case (par)
      PAR_8:   rm = rm8;
      PAR_16:  rm = rm16;
      PAR_24:  rm = rm24;
      default: rm = P32_EN ? rm32 : c;
    endcase
  end

endmodule
