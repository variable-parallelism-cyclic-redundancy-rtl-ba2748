// tb_crc24_check: checks the remainder comparator.
//
// With res_valid high, equal values must give crc_ok and unequal ones (one random bit
// flipped) crc_fail; with res_valid low both flags must stay low.
module tb_crc24_check;
  logic        res_valid, crc_ok, crc_fail;
  logic [23:0] rem, expected;
  int checks = 0, failures = 0;

  crc24_check dut (.res_valid, .rem, .expected, .crc_ok, .crc_fail);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit eq;
    for (int i = 0; i < 600; i++) begin
      res_valid = (i % 3) != 0;
      eq        = (i % 2) == 0;
      rem       = 24'($urandom);
      expected  = eq ? rem : rem ^ (24'(1) << ($urandom % 24));
      #1;
      checks += 2;
      if (crc_ok !== (res_valid && eq))    begin failures++; $display("crc_ok wrong at %0d", i);   end
      if (crc_fail !== (res_valid && !eq)) begin failures++; $display("crc_fail wrong at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
