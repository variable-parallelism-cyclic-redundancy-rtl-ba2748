// tb_crc24_rd_reg: checks the r_d input register, 24-bit and 32-bit.
//
// Random words of random parallelism are presented with random valid. One cycle later
// the control must be the presented control, and for a valid word r_d must hold the word
// in its most significant bits with the rest zero; after an invalid word r_d keeps its
// previous value. Reset must clear the valid flag.
module tb_crc24_rd_reg;
  import crc24_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  word_ctl_t in_ctl, ctl_a, ctl_b;
  logic [31:0] in_d, rd_b;
  logic [23:0] rd_a;
  int checks = 0, failures = 0;

  crc24_rd_reg #(.P32_EN(1'b0)) dut_a (.clk, .rst_n, .in_ctl, .in_d(in_d[23:0]), .rd_ctl(ctl_a), .rd(rd_a));
  crc24_rd_reg #(.P32_EN(1'b1)) dut_b (.clk, .rst_n, .in_ctl, .in_d,             .rd_ctl(ctl_b), .rd(rd_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] align32(logic [31:0] d, par_e p);
    case (p)
      PAR_8:   return {d[7:0], 24'h0};
      PAR_16:  return {d[15:0], 16'h0};
      PAR_24:  return {d[23:0], 8'h0};
      default: return d;
    endcase
  endfunction

  initial begin
    logic [31:0] exp_b;
    logic [23:0] exp_a;
    in_ctl = '{valid: 1'b1, first: 1'b0, last: 1'b0, par: PAR_8};
    in_d   = '0;
    repeat (2) @(posedge clk);
    #1;
    checks += 2;
    if (ctl_a.valid !== 1'b0) begin failures++; $display("valid not cleared by reset (24)"); end
    if (ctl_b.valid !== 1'b0) begin failures++; $display("valid not cleared by reset (32)"); end
    rst_n = 1'b1;
    exp_a = '0; exp_b = '0;
    for (int i = 0; i < 1000; i++) begin
      in_ctl.valid = ($urandom % 4) != 0;
      in_ctl.first = 1'($urandom);
      in_ctl.last  = 1'($urandom);
      in_ctl.par   = par_e'($urandom % 4);
      in_d         = $urandom;
      if (in_ctl.valid) begin
        exp_b = align32(in_d, in_ctl.par);
        // the 24-bit register sees a P-32 code as "full width"
        exp_a = (in_ctl.par == PAR_32) ? in_d[23:0] : exp_b[31:8];
      end
      @(posedge clk);
      #1;
      checks += 4;
      if (ctl_a !== in_ctl) begin failures++; $display("ctl 24 mismatch at %0d", i); end
      if (ctl_b !== in_ctl) begin failures++; $display("ctl 32 mismatch at %0d", i); end
      if (rd_a !== exp_a) begin failures++; $display("rd 24 got %h exp %h (par %0d)", rd_a, exp_a, in_ctl.par); end
      if (rd_b !== exp_b) begin failures++; $display("rd 32 got %h exp %h (par %0d)", rd_b, exp_b, in_ctl.par); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
