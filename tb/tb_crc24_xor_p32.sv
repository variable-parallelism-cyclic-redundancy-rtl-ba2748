// tb_crc24_xor_p32: checks the P-32 XOR network against bit-serial division.
//
// rm32 must equal the remainder of dividing all 32 rd bits, MSB first, starting from
// remainder c, for walking ones and random pairs.
module tb_crc24_xor_p32;
  import crc24_ref_pkg::*;

  logic [31:0] rd;
  logic [23:0] c, rm32;
  int checks = 0, failures = 0;

  crc24_xor_p32 dut (.rd, .c, .rm32);

  task automatic check_one(logic [31:0] d_in, logic [23:0] c_in);
    bit [23:0] e;
    rd = d_in; c = c_in;
    #1;
    e = alg1_remainder(word_bits(d_in, 31, 32), c_in);
    checks++;
    if (rm32 !== e) begin failures++; $display("P-32 rd=%h c=%h got %h exp %h", d_in, c_in, rm32, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) check_one(32'(1) << i, '0);
    for (int i = 0; i < 24; i++) check_one('0, 24'(1) << i);
    for (int i = 0; i < 2000; i++) check_one($urandom, 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
