// tb_crc24_xor_net: checks the P-8/16/24 XOR network against bit-serial division.
//
// For walking-one patterns on every rd and c bit and for random (rd, c) pairs, each of
// rm8, rm16 and rm24 must equal the remainder obtained by dividing the 8, 16 or 24 most
// significant rd bits, MSB first, one bit at a time starting from remainder c.
module tb_crc24_xor_net;
  import crc24_ref_pkg::*;

  logic [23:0] rd, c, rm8, rm16, rm24;
  int checks = 0, failures = 0;

  crc24_xor_net dut (.rd, .c, .rm8, .rm16, .rm24);

  task automatic check_one(logic [23:0] d_in, logic [23:0] c_in);
    bit [23:0] e8, e16, e24;
    rd = d_in; c = c_in;
    #1;
    e8  = alg1_remainder(word_bits({d_in, 8'h0}, 31, 8),  c_in);
    e16 = alg1_remainder(word_bits({d_in, 8'h0}, 31, 16), c_in);
    e24 = alg1_remainder(word_bits({d_in, 8'h0}, 31, 24), c_in);
    checks += 3;
    if (rm8 !== e8)   begin failures++; $display("P-8  rd=%h c=%h got %h exp %h", d_in, c_in, rm8, e8);   end
    if (rm16 !== e16) begin failures++; $display("P-16 rd=%h c=%h got %h exp %h", d_in, c_in, rm16, e16); end
    if (rm24 !== e24) begin failures++; $display("P-24 rd=%h c=%h got %h exp %h", d_in, c_in, rm24, e24); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 24; i++) check_one(24'(1) << i, '0);
    for (int i = 0; i < 24; i++) check_one('0, 24'(1) << i);
    for (int i = 0; i < 2000; i++) check_one(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
