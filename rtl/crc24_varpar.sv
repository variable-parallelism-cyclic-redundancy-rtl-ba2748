// crc24_varpar: variable-parallelism CRC-24b circuit for 3GPP-LTE/LTE-Advanced.
//
// Divides a frame by the LTE CRC-24b generator x^24+x^23+x^6+x^5+x+1 while taking a
// different number of frame bits every cycle: 8, 16 or 24 (and 32 with P32_EN = 1),
// chosen per word by in_par. This lets a turbo decoder feed hard decisions straight
// from memories and registers of 1, 2 or 4 bytes, or from truncated border windows,
// without assembling fixed-size words first.
//
// Datapath (one word per cycle, no stalls):
//   in_d --> r_d register --> XOR network (rm8, rm16, rm24 [, rm32]) --> parallelism
//   multiplexer --> remainder register c --> back to the XOR network.
// The XOR network holds the unfolded division equations for every parallelism at
// once, with sub-terms shared between them; the multiplexer keeps the one that matches
// the word's parallelism. The remainder register starts each frame from zero.
//
// Interface: a word is presented with in_valid; in_first marks the first word of a
// frame and in_last the last. in_d is right-aligned (P-8 on in_d[7:0], ...); its most
// significant valid bit is the earliest frame bit. Frames may follow back to back.
//
// Timing: a word presented in cycle t is registered into r_d at the end of t, its
// remainder is computed in t+1 and registered into c at the end of t+1. The frame's
// remainder is on rem with rem_valid high in cycle t_last+2, and crc_ok/crc_fail
// compare it with crc_expected in that same cycle. A frame of m bits therefore takes
// m/P cycles of input plus a fixed 2-cycle latency.
//
// The structure, the Table-I equations, the MSB-aligned r_d and the P-32 extension
// follow the document. The frame markers, the right-aligned input, the zero start on
// the first word and the check outputs are this design's own interface choices. The
// default is the document's main circuit (P-8/16/24); P32_EN = 1 gives its P-32 variant.
module crc24_varpar
  import crc24_pkg::*;
#(
  parameter bit P32_EN = 1'b0,
  localparam int unsigned RD_W = P32_EN ? 32 : 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  par_e            in_par,
  input  logic [RD_W-1:0] in_d,
  input  logic [M-1:0]    crc_expected,
  output logic [M-1:0]    rem,
  output logic            rem_valid,
  output logic            crc_ok,
  output logic            crc_fail
);

  word_ctl_t       in_ctl, rd_ctl;
  logic [RD_W-1:0] rd;
  logic [M-1:0]    c_fb, rm8, rm16, rm24, rm32, rm;

  always_comb in_ctl = '{valid: in_valid, first: in_first, last: in_last, par: in_par};

  crc24_rd_reg #(.P32_EN(P32_EN)) u_rd (
    .clk, .rst_n, .in_ctl, .in_d, .rd_ctl, .rd
  );

  // P-8/16/24 equations use the 24 most significant bits of r_d.
  crc24_xor_net u_xor (
    .rd(rd[RD_W-1 -: M]), .c(c_fb), .rm8, .rm16, .rm24
  );

  if (P32_EN) begin : g_p32
    crc24_xor_p32 u_xor32 (.rd(rd), .c(c_fb), .rm32);
  end else begin : g_no_p32
    assign rm32 = '0;
  end

  crc24_rm_mux #(.P32_EN(P32_EN)) u_mux (
    .par(rd_ctl.par), .c(c_fb), .rm8, .rm16, .rm24, .rm32, .rm
  );

  crc24_rem_reg u_rem (
    .clk, .rst_n,
    .valid(rd_ctl.valid), .first(rd_ctl.first), .last(rd_ctl.last),
    .rm, .c_fb, .c(rem), .res_valid(rem_valid)
  );

  crc24_check u_chk (
    .res_valid(rem_valid), .rem, .expected(crc_expected), .crc_ok, .crc_fail
  );

  // A P-32 word is only legal when the P-32 extension is built.
  a_par_supported: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (P32_EN || in_par != PAR_32))
    else $error("P-32 word presented without the P-32 extension");

endmodule
