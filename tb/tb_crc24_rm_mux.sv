// tb_crc24_rm_mux: checks the parallelism multiplexer, with and without P-32.
//
// Random candidate remainders are applied; for every parallelism code the output must be
// the matching candidate. Without the P-32 extension a PAR_32 code must return c.
module tb_crc24_rm_mux;
  import crc24_pkg::*;

  par_e        par;
  logic [23:0] c, rm8, rm16, rm24, rm32, rm_a, rm_b;
  int checks = 0, failures = 0;

  crc24_rm_mux #(.P32_EN(1'b0)) dut_a (.par, .c, .rm8, .rm16, .rm24, .rm32, .rm(rm_a));
  crc24_rm_mux #(.P32_EN(1'b1)) dut_b (.par, .c, .rm8, .rm16, .rm24, .rm32, .rm(rm_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] ea, eb;
    for (int i = 0; i < 400; i++) begin
      c = 24'($urandom); rm8 = 24'($urandom); rm16 = 24'($urandom);
      rm24 = 24'($urandom); rm32 = 24'($urandom);
      par = par_e'(i % 4);
      #1;
      case (i % 4)
        0:       begin ea = rm8;  eb = rm8;  end
        1:       begin ea = rm16; eb = rm16; end
        2:       begin ea = rm24; eb = rm24; end
        default: begin ea = c;    eb = rm32; end
      endcase
      checks += 2;
      if (rm_a !== ea) begin failures++; $display("no-P32 par=%0d got %h exp %h", i % 4, rm_a, ea); end
      if (rm_b !== eb) begin failures++; $display("P32 par=%0d got %h exp %h", i % 4, rm_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
