// tb_crc24_full: one complete operation of the circuit at its default configuration.
//
// A maximum-size LTE code block (K = 6144: 6120 data bits and the 24 parity bits a
// transmitter appends, computed by an independent LFSR) is fed to the default circuit
// (P-8/16/24) as words of randomly varying parallelism, immediately followed by the
// same frame's data part alone, fed in P-24 words. The first must leave a zero remainder
// and raise crc_ok against zero; the second must leave the bit-serial remainder of the
// data, take exactly 255 input cycles, and deliver its result two cycles after its
// last word.
module tb_crc24_full;
  import crc24_pkg::*;
  import crc24_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  par_e        in_par = PAR_8;
  logic [23:0] in_d = '0, crc_expected = '0, rem;
  logic        rem_valid, crc_ok, crc_fail;
  int          checks = 0, failures = 0;
  int unsigned cyc = 0, last_edge = 0, n_res = 0;

  crc24_varpar dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_par, .in_d,
                    .crc_expected, .rem, .rem_valid, .crc_ok, .crc_fail);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitq_t data, frame;
  bit [23:0] exp_data_rem;

  task automatic feed(bitq_t bits, bit random_par, output int unsigned words);
    int unsigned pos = 0, n;
    par_e p;
    logic [23:0] w;
    words = 0;
    while (pos < bits.size()) begin
      if (random_par) begin
        do p = par_e'($urandom % 3);
        while (par_bits(p) > bits.size() - pos);
      end else p = PAR_24;
      n = par_bits(p);
      w = '0;
      for (int unsigned j = 0; j < n; j++) w[n-1-j] = bits[pos + j];
      in_valid <= 1'b1; in_first <= (pos == 0); in_last <= (pos + n == bits.size());
      in_par <= p; in_d <= w;
      pos += n;
      words++;
      @(posedge clk);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_last) last_edge <= cyc;
    if (rem_valid) begin
      checks += 3;
      if (cyc != last_edge + 2) begin failures++; $display("result latency %0d", cyc - last_edge); end
      if (n_res == 0) begin
        if (rem !== '0 || !crc_ok) begin failures++; $display("full frame remainder %h ok=%b", rem, crc_ok); end
      end else begin
        if (rem !== exp_data_rem || !crc_ok) begin
          failures++; $display("data remainder %h expected %h ok=%b", rem, exp_data_rem, crc_ok);
        end
      end
      n_res <= n_res + 1;
    end
  end

  initial begin
    int unsigned w1, w2, t0;
    bit [23:0] par;
    for (int i = 0; i < 6120; i++) data.push_back(1'($urandom));
    par = lte_parity(data);
    frame = data;
    for (int i = 23; i >= 0; i--) frame.push_back(par[i]);
    exp_data_rem = alg1_remainder(data);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    crc_expected <= '0;
    feed(frame, 1'b1, w1);
    t0 = cyc;
    // expected value switches when the first result has been delivered (two cycles on)
    fork
      begin
        repeat (2) @(posedge clk);
        crc_expected <= exp_data_rem;
      end
    join_none
    feed(data, 1'b0, w2);
    checks++;
    if (w2 != 255 || cyc - t0 != 255) begin
      failures++; $display("data part took %0d words in %0d cycles, expected 255", w2, cyc - t0);
    end
    in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_res != 2) begin failures++; $display("%0d results, expected 2", n_res); end
    $display("full frame: %0d words; data part: %0d words", w1, w2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
