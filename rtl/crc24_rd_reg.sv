// crc24_rd_reg: input data register r_d of the variable-parallelism CRC-24b circuit.
//
// Each cycle a new data word d arrives together with its control (valid, first, last
// and parallelism). d is presented right-aligned: a P-8 word on d[7:0], a P-16 word on
// d[15:0], and so on. The register stores it left-aligned, in the 8, 16, 24 (or 32)
// most significant bits of r_d, with the unused low bits cleared, which is the layout
// the XOR network expects. With P32_EN = 0 r_d is 24 bits wide, as in the document's
// main circuit; with P32_EN = 1 it is 32 bits wide for the P-32 extension.
//
// Timing: one register stage. The word presented in cycle t is in r_d during cycle
// t+1. Reset clears the valid flag; data bits are loaded only with a valid word.
// Storing d MSB-aligned follows the document; the right-aligned input and the clearing
// of unused bits are this design's choices.
module crc24_rd_reg
  import crc24_pkg::*;
#(
  parameter bit P32_EN = 1'b0,
  localparam int unsigned RD_W = P32_EN ? 32 : 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  word_ctl_t       in_ctl,
  input  logic [RD_W-1:0] in_d,     // right-aligned data word
  output word_ctl_t       rd_ctl,   // control of the word held in r_d
  output logic [RD_W-1:0] rd        // r_d, MSB-aligned
);

  logic [RD_W-1:0] aligned;

  always_comb begin
    aligned = '0;
    case (in_ctl.par)
      PAR_8:   aligned[RD_W-1 -: 8]  = in_d[7:0];
      PAR_16:  aligned[RD_W-1 -: 16] = in_d[15:0];
      PAR_24:  aligned[RD_W-1 -: 24] = in_d[23:0];
      default: aligned               = in_d;       // P-32 (full width)
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ctl <= '{valid: 1'b0, first: 1'b0, last: 1'b0, par: PAR_8};
      rd     <= '0;
    end else begin
      rd_ctl <= in_ctl;
      if (in_ctl.valid) rd <= aligned;
    end
  end

endmodule
