// tb_random_errors: random multiple-bit error statistics of the byte code,
// measured on the hardware codec. For the (N, K, M) = (78, 64, 8),
// (144, 128, 8) and (76, 64, 4) codes (k = 8, 16, 16 bytes; N counts the
// used parity bits, not the padding of the last row byte) it writes a
// random page, flips p = 1..8 distinct random bits of the N-bit codeword,
// reads it back through the decoder and sorts the outcome: corrected (all
// data read back right), detected (two_err), mis-corrected (one_err or
// no_err with wrong data read back). Every verdict and every read is
// checked against the reference decoder; one-bit errors must all be
// corrected and two-bit errors all detected. The rates are printed for
// comparison with published simulations of this code family. A second
// pass on (78, 64, 8) flips bursts of p = 2..7 adjacent bits, adjacent in
// transfer order (byte by byte, bit 0 first, data then column byte then
// row vector); that order is this test's choice. The three codes, the
// error counts and the burst lengths are those of the published
// experiments; the 2000 patterns per case are this test's (the published
// runs used 10^6 in software). Cycle-count watchdog; ends with the
// TB_RESULT line.
module tb_random_errors;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int PATTERNS = 2000;  // per code and error count

  logic              clk = 0;
  logic              clrb = 0, en_enc = 0, en_dec = 0;
  logic [MI_W-1:0]   mi = '0;
  logic [KI_W-1:0]   ki = '0;
  logic [DATA_W-1:0] din = '0;
  logic [ADDR_W-1:0] read_addr = '0;
  logic [DATA_W-1:0] enc_dout, dec_dout, err_bit;
  logic              ctl_o, page_end, dec_valid, one_err, two_err, no_err, sbed, ded;
  logic [ADDR_W-1:0] err_addr;

  int checks = 0, failures = 0;

  fec_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // flip bit q of the unpadded codeword (data, column byte, row vector)
  function automatic void flip(ref byte_q_t cw, input int q, input int k, input int m);
    if (q < k * m) cw[q / m][q % m] ^= 1'b1;
    else if (q < k * m + m) cw[k][q - k * m] ^= 1'b1;
    else cw[k + 1 + (q - k * m - m) / m][(q - k * m - m) % m] ^= 1'b1;
  endfunction

  // one pattern: returns 0 corrected, 1 detected, 2 mis-corrected
  task automatic one_pattern(int k, int m, int p, bit burst, output int outcome);
    byte_q_t d, cw, rx;
    verdict_t v;
    int nb = k * m + m + 2 * xp_of(k);
    int pos[$];
    bit wrong = 0;
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    cw = encode(d, k, m);
    rx = cw;
    if (burst) begin
      // p adjacent bits of the codeword in transfer order
      int q0 = $urandom_range(nb - p);
      for (int q = q0; q < q0 + p; q++) begin
        pos.push_back(q);
        flip(rx, q, k, m);
      end
    end
    while (pos.size() < p) begin
      int q = $urandom_range(nb - 1);
      bit dup = 0;
      foreach (pos[z]) if (pos[z] == q) dup = 1;
      if (!dup) begin
        pos.push_back(q);
        flip(rx, q, k, m);
      end
    end
    v = decode(rx, k, m);
    @(negedge clk);
    mi = MI_W'(m - 1); ki = KI_W'(k); en_enc = 1; en_dec = 1; clrb = 0;
    @(negedge clk);
    clrb = 1;
    foreach (rx[t]) begin
      din = rx[t];
      @(negedge clk);
    end
    @(negedge clk);
    check(dec_valid && no_err == v.no_err && one_err == v.sec && two_err == (v.sbed || v.ded),
          $sformatf("verdict k=%0d m=%0d p=%0d", k, m, p));
    for (int a = 0; a < k; a++) begin
      bit [7:0] e;
      read_addr = ADDR_W'(a);
      @(negedge clk);
      e = rx[a] ^ ((v.sec && a == v.addr) ? v.bits : 8'h00);
      check(dec_dout === e, "read back");
      if (dec_dout !== d[a]) wrong = 1;
    end
    if (two_err) outcome = 1;
    else outcome = wrong ? 2 : 0;
  endtask

  task automatic run(int k, int m);
    int nb = k * m + m + 2 * xp_of(k);
    for (int p = 1; p <= 8; p++) begin
      int cnt[3] = '{0, 0, 0};
      for (int it = 0; it < PATTERNS; it++) begin
        int o;
        one_pattern(k, m, p, 1'b0, o);
        cnt[o]++;
      end
      $display("(N,K,M)=(%0d,%0d,%0d) %0d-bit errors: corrected %0.1f%%  detected %0.1f%%  mis-corrected or undetected %0.1f%%",
               nb, k * m, m, p, 100.0 * cnt[0] / PATTERNS, 100.0 * cnt[1] / PATTERNS,
               100.0 * cnt[2] / PATTERNS);
      if (p == 1) check(cnt[0] == PATTERNS, "every single-bit error corrected");
      if (p == 2) check(cnt[1] == PATTERNS, "every double-bit error detected");
    end
  endtask

  // bursts of p = 2..7 adjacent bits, as in the burst-error experiment
  task automatic run_burst(int k, int m);
    int nb = k * m + m + 2 * xp_of(k);
    for (int p = 2; p <= 7; p++) begin
      int cnt[3] = '{0, 0, 0};
      for (int it = 0; it < PATTERNS; it++) begin
        int o;
        one_pattern(k, m, p, 1'b1, o);
        cnt[o]++;
      end
      $display("(N,K,M)=(%0d,%0d,%0d) %0d-bit bursts: corrected %0.1f%%  detected %0.1f%%  mis-corrected or undetected %0.1f%%",
               nb, k * m, m, p, 100.0 * cnt[0] / PATTERNS, 100.0 * cnt[1] / PATTERNS,
               100.0 * cnt[2] / PATTERNS);
      // a 2-bit burst is a double error: always detected
      if (p == 2) check(cnt[1] == PATTERNS, "every 2-bit burst detected");
    end
  endtask

  initial begin
    run_burst(8, 8);  // (78, 64, 8)
    run(8, 8);     // (78, 64, 8)
    run(16, 8);    // (144, 128, 8)
    run(16, 4);    // (76, 64, 4)
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
