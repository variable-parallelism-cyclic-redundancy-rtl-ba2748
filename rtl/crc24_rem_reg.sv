// crc24_rem_reg: remainder shift register of the variable-parallelism CRC-24b circuit.
//
// Holds the current remainder c (24 flip-flops, the circuit's only state besides r_d).
// In every cycle in which r_d holds a valid word it loads the selected new remainder
// rm. The remainder fed back to the XOR network, c_fb, is forced to zero while r_d
// holds the first word of a frame: the division then starts from an all-zero
// remainder without a dead cycle between frames, so frames can follow each other
// back to back. After the last word of a frame the register holds that frame's
// remainder for one cycle, flagged by res_valid.
//
// Timing: rm computed in cycle t (from the word in r_d) is in c in cycle t+1, and
// res_valid is high in cycle t+1 when that word was the last of its frame.
// The register, the loading of rm and the zero start of Alg. 1 follow the document;
// the zero forcing on the first word and res_valid are this design's choices.
module crc24_rem_reg
  import crc24_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,     // r_d holds a word
  input  logic         first,     // ... and it is the first word of a frame
  input  logic         last,      // ... and it is the last word of a frame
  input  logic [M-1:0] rm,        // selected new remainder
  output logic [M-1:0] c_fb,      // remainder fed to the XOR network
  output logic [M-1:0] c,         // register contents
  output logic         res_valid  // c holds a finished frame's remainder
);

  always_comb c_fb = (valid && first) ? '0 : c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c         <= '0;
      res_valid <= 1'b0;
    end else begin
      if (valid) c <= rm;
      res_valid <= valid && last;
    end
  end

endmodule
