// tb_crc24_rem_reg: checks the remainder register.
//
// A cycle-by-cycle model of the register is kept in the testbench: c loads rm on valid
// cycles and holds otherwise; c_fb is zero exactly when valid and first are both high;
// res_valid follows valid && last by one cycle. Reset must clear c and res_valid.
module tb_crc24_rem_reg;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        valid, first, last, res_valid;
  logic [23:0] rm, c_fb, c;
  int checks = 0, failures = 0;

  crc24_rem_reg dut (.clk, .rst_n, .valid, .first, .last, .rm, .c_fb, .c, .res_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] model_c;
    logic        model_rv;
    valid = 1'b0; first = 1'b0; last = 1'b0; rm = 24'hFFFFFF;
    repeat (2) @(posedge clk);
    #1;
    checks += 2;
    if (c !== '0)         begin failures++; $display("c not cleared by reset"); end
    if (res_valid !== 0)  begin failures++; $display("res_valid not cleared by reset"); end
    rst_n = 1'b1;
    model_c = '0; model_rv = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      valid = ($urandom % 4) != 0;
      first = ($urandom % 3) == 0;
      last  = ($urandom % 3) == 0;
      rm    = 24'($urandom);
      #1;
      checks++;
      if (c_fb !== ((valid && first) ? 24'h0 : model_c)) begin
        failures++; $display("c_fb got %h at %0d", c_fb, i);
      end
      @(posedge clk);
      if (valid) model_c = rm;
      model_rv = valid && last;
      #1;
      checks += 2;
      if (c !== model_c)          begin failures++; $display("c got %h exp %h", c, model_c); end
      if (res_valid !== model_rv) begin failures++; $display("res_valid got %b exp %b", res_valid, model_rv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
