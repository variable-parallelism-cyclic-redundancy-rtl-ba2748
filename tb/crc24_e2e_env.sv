// crc24_e2e_env: end-to-end stimulus and scoreboard for one crc24_varpar instance.
//
// Generates LTE-style frames (sizes that are multiples of 8 bits, 40 to MAX_K) and feeds
// them to the circuit as a stream of words whose parallelism is drawn at random for
// every word (bounded by the bits left), with occasional idle cycles inside a frame and
// with frames following each other back to back or after a gap. Two kinds of frame:
//   - data only (K-24 bits): the expected remainder is the bit-serial division of the
//     bits fed; crc_expected is set to it (crc_ok expected) or to a corrupted copy
//     (crc_fail expected);
//   - full LTE frame: data plus the 24 parity bits an LTE transmitter appends, computed
//     by an independent LFSR; the remainder must be zero. Some frames get one bit
//     flipped and must then give a non-zero remainder and crc_fail.
// Directed frames come first: the two-core K = 80 example (P-16, P-16, P-8 per core) and
// a K = 6144 frame split into the fewest words, whose word count must be 255 (P-24) or
// 192 (with P-32). For every frame the result must appear exactly two cycles after its
// last word. ev[] counts how often each mechanism occurred.
module crc24_e2e_env
  import crc24_pkg::*;
  import crc24_ref_pkg::*;
#(
  parameter bit          P32_EN   = 1'b0,
  parameter int unsigned N_FRAMES = 40,
  parameter int unsigned MAX_K    = 6144
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int          checks,
  output int          failures,
  output int unsigned ev [12]
);
  localparam int unsigned RD_W = P32_EN ? 32 : 24;

  // event indices
  localparam int EV_P8 = 0, EV_P16 = 1, EV_P24 = 2, EV_P32 = 3, EV_SWITCH = 4,
                 EV_B2B = 5, EV_GAP = 6, EV_OK = 7, EV_FAIL = 8, EV_K80 = 9,
                 EV_FULLFRAME = 10, EV_KMAX = 11;

  logic            in_valid, in_first, in_last;
  par_e            in_par;
  logic [RD_W-1:0] in_d;
  logic [23:0]     crc_expected, rem;
  logic            rem_valid, crc_ok, crc_fail;

  crc24_varpar #(.P32_EN(P32_EN)) dut (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .in_par, .in_d, .crc_expected,
    .rem, .rem_valid, .crc_ok, .crc_fail
  );

  // Expected results, indexed by frame number.
  localparam int unsigned NMAX = N_FRAMES + 8;
  logic [23:0] exp_rem [NMAX];
  logic [23:0] exp_cmp [NMAX];
  int unsigned n_sent = 0, n_done = 0;
  int unsigned cyc = 0;
  int unsigned last_edge_q[$];
  int unsigned first_edge = 0;

  always_comb crc_expected = (n_done < NMAX) ? exp_cmp[n_done] : '0;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    foreach (ev[i]) ev[i] = 0;
  end

  // ---------------- driver ----------------
  par_e prev_par;
  bit   prev_was_last = 1'b0;

  task automatic send_word(bitq_t bits, ref int unsigned pos, input par_e p, input bit first,
                           input bit last);
    int unsigned n = par_bits(p);
    logic [31:0] w = '0;
    for (int unsigned j = 0; j < n; j++) w[n-1-j] = bits[pos + j];
    pos += n;
    in_valid <= 1'b1; in_first <= first; in_last <= last;
    in_par   <= p;    in_d     <= RD_W'(w);
    case (p)
      PAR_8: ev[EV_P8]++;  PAR_16: ev[EV_P16]++;
      PAR_24: ev[EV_P24]++; default: ev[EV_P32]++;
    endcase
    if (!first && p != prev_par) ev[EV_SWITCH]++;
    if (first && prev_was_last) ev[EV_B2B]++;
    prev_par = p;
    prev_was_last = last;
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 1'b0; in_first <= 1'b0; in_last <= 1'b0;
    prev_was_last = 1'b0;
    @(posedge clk);
  endtask

  // Feeds one frame with the given parallelism plan (empty plan: random choice).
  task automatic send_frame(bitq_t bits, par_e plan[$], bit allow_gaps, output int unsigned words);
    int unsigned pos = 0;
    int unsigned left;
    par_e p;
    words = 0;
    while (pos < bits.size()) begin
      left = bits.size() - pos;
      if (plan.size() != 0) p = plan[words];
      else begin
        do p = par_e'($urandom % (P32_EN ? 4 : 3));
        while (par_bits(p) > left);
      end
      if (allow_gaps && words != 0 && ($urandom % 16) == 0) begin
        idle();
        ev[EV_GAP]++;
      end
      send_word(bits, pos, p, words == 0, pos + par_bits(p) >= bits.size());
      words++;
    end
  endtask

  function automatic bitq_t random_bits(int unsigned n);
    bitq_t q;
    for (int unsigned i = 0; i < n; i++) q.push_back(1'($urandom));
    return q;
  endfunction

  // Queue a frame's expected outcome; mode 0 data only, 1 full LTE frame.
  task automatic expect_frame(bitq_t fed, bit full, bit corrupt_cmp);
    bit [23:0] r = alg1_remainder(fed);
    exp_rem[n_sent] = r;
    exp_cmp[n_sent] = full ? 24'h0 : (corrupt_cmp ? r ^ 24'h000400 : r);
    n_sent++;
  endtask

  function automatic bitq_t lte_frame(int unsigned k, bit flip);
    bitq_t q = random_bits(k - 24);
    bit [23:0] p = lte_parity(q);
    for (int i = 23; i >= 0; i--) q.push_back(p[i]);
    if (flip) q[$urandom % k] ^= 1'b1;
    return q;
  endfunction

  initial begin
    bitq_t core0, core1, fr;
    par_e  plan[$], none[$];
    int unsigned words, k, w0, w1, t0;
    bit full, flip;
    in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_par = PAR_8; in_d = '0;
    foreach (exp_cmp[i]) begin exp_cmp[i] = '0; exp_rem[i] = '0; end
    @(posedge rst_n);
    repeat (2) @(posedge clk);

    // Two-core K = 80 example: each core holds 40 frame bits as 16 + 16 + 8.
    // The two cores' words are one frame, fed as two word groups.
    fr = lte_frame(80, 1'b0);
    expect_frame(fr, 1'b1, 1'b0);
    plan = '{PAR_16, PAR_16, PAR_8, PAR_16, PAR_16, PAR_8};
    send_frame(fr, plan, 1'b0, words);
    ev[EV_K80]++;
    checks++;
    if (words != 6) begin failures++; $display("K=80 example took %0d words", words); end
    idle();

    // Largest LTE frame, data part only (6120 bits), fewest words.
    fr = random_bits(6144 - 24);
    expect_frame(fr, 1'b0, 1'b0);
    plan.delete();
    if (P32_EN) begin
      repeat (191) plan.push_back(PAR_32);
      plan.push_back(PAR_8);
    end else begin
      repeat (255) plan.push_back(PAR_24);
    end
    t0 = cyc;
    send_frame(fr, plan, 1'b0, words);
    ev[EV_KMAX]++;
    checks += 2;
    if (words != (P32_EN ? 192 : 255)) begin failures++; $display("K=6144 took %0d words", words); end
    if (cyc - t0 != words) begin failures++; $display("K=6144 words not accepted every cycle"); end

    // Random frames, back to back or with gaps.
    for (int f = 0; f < int'(N_FRAMES); f++) begin
      k    = 40 + 8 * ($urandom % ((MAX_K - 40) / 8 + 1));
      full = 1'($urandom);
      flip = ($urandom % 4) == 0;
      if (full) begin
        fr = lte_frame(k, flip);
        expect_frame(fr, 1'b1, 1'b0);
        ev[EV_FULLFRAME]++;
      end else begin
        fr = random_bits(k - 24);
        expect_frame(fr, 1'b0, flip);
      end
      send_frame(fr, none, 1'b1, words);
      if (($urandom % 3) == 0) idle();
    end
    idle();
    repeat (10) @(posedge clk);
    checks++;
    if (n_done != n_sent) begin failures++; $display("%0d frames sent, %0d results", n_sent, n_done); end
    done = 1'b1;
  end

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && in_last) last_edge_q.push_back(cyc);
    if (rst_n && rem_valid) begin
      int unsigned le;
      checks += 3;
      if (n_done >= n_sent || last_edge_q.size() == 0) begin
        failures++; $display("unexpected result %h", rem);
      end else begin
        le = last_edge_q.pop_front();
        if (cyc != le + 2) begin
          failures++; $display("frame %0d result after %0d cycles, expected 2", n_done, cyc - le);
        end
        if (rem !== exp_rem[n_done]) begin
          failures++; $display("frame %0d remainder %h expected %h", n_done, rem, exp_rem[n_done]);
        end
        if (crc_ok !== (exp_rem[n_done] == exp_cmp[n_done]) || crc_fail === crc_ok) begin
          failures++; $display("frame %0d crc_ok=%b crc_fail=%b", n_done, crc_ok, crc_fail);
        end
        if (crc_ok) ev[EV_OK]++;
        if (crc_fail) ev[EV_FAIL]++;
      end
      n_done <= n_done + 1;
    end
  end

endmodule
