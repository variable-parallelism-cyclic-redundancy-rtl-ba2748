// tb_crc24_varpar: end-to-end test of the variable-parallelism CRC-24b circuit.
//
// Runs two instances side by side through crc24_e2e_env: the main circuit (P-8/16/24)
// and the P-32 variant. Each receives directed frames (the two-core K = 80 example, a
// K = 6144 frame) and random LTE frames with per-word parallelism changes, idle cycles
// and back-to-back frames. Every result is checked for value, crc_ok/crc_fail and
// latency. Each mechanism must occur at least once: every parallelism (P-32 only in the
// variant), a parallelism switch inside a frame, back-to-back frames, an idle cycle
// inside a frame, a passing and a failing check, the K = 80 example, a full LTE frame
// checked against zero and a maximum-size frame.
module tb_crc24_varpar;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;
  int unsigned ev_a [12], ev_b [12];
  int   checks, failures;

  localparam string EV_NAME [12] = '{"P-8 word", "P-16 word", "P-24 word", "P-32 word",
    "parallelism switch", "back-to-back frames", "idle cycle in frame", "crc_ok",
    "crc_fail", "K=80 two-core example", "full LTE frame", "K=6144 frame"};

  crc24_e2e_env #(.P32_EN(1'b0), .N_FRAMES(40), .MAX_K(6144)) env_a (
    .clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a), .ev(ev_a));
  crc24_e2e_env #(.P32_EN(1'b1), .N_FRAMES(40), .MAX_K(6144)) env_b (
    .clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b), .ev(ev_b));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b);
    checks   = checks_a + checks_b;
    failures = failures_a + failures_b;
    for (int i = 0; i < 12; i++) begin
      $display("%-24s main %0d  p32 %0d", EV_NAME[i], ev_a[i], ev_b[i]);
      checks += 2;
      if (i != 3 && ev_a[i] == 0) begin failures++; $display("  never happened (main)"); end
      if (ev_b[i] == 0)           begin failures++; $display("  never happened (p32)");  end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
