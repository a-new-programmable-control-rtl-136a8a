// tb_fec_codec: end-to-end test of the programmable codec at its default
// size (4096-byte buffer). For a range of (k, m) settings it writes a page
// (checking every encoder output byte against the reference code, the CTL
// window and END at cycle n), then reads the codeword back with injected
// errors of each kind: none, one bit in the parity bytes, one bit in the
// data, three bits in one byte, two bits in one byte, two bits in different
// bytes. It checks the verdict (one cycle after END, i.e. cycle n+1)
// against the reference decoder and the expected error class, then reads
// every buffered byte by random access and checks the corrected data.
// It also checks that an out-of-range Ki leaves the codec idle.
module tb_fec_codec;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

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
  int n_noerr = 0, n_parerr = 0, n_sec = 0, n_sodd = 0, n_sbed = 0, n_ded = 0, n_idle = 0;
  int n_corrected = 0;

  fec_codec dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
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

  task automatic start_page(int k, int m, bit dec);
    @(negedge clk);
    mi = MI_W'(m - 1);
    ki = KI_W'(k);
    en_enc = 1;
    en_dec = dec;
    clrb = 0;
    @(negedge clk);
    clrb = 1;
  endtask

  task automatic write_page(byte_q_t d, int k, int m);
    byte_q_t cw = encode(d, k, m);
    int n = cw.size();
    start_page(k, m, 0);
    for (int t = 0; t < n; t++) begin
      din = (t < k) ? d[t] : 8'($urandom);
      #1;
      check(enc_dout === cw[t], $sformatf("enc byte %0d k=%0d m=%0d got %h exp %h", t, k, m, enc_dout, cw[t]));
      check(ctl_o == (t >= k), "ctl window");
      check(!page_end, "end early");
      @(negedge clk);
    end
    check(page_end, $sformatf("END at cycle n=%0d", n));
  endtask

  // read a codeword back, verdict at n+1, then random-access reads
  task automatic read_page(byte_q_t rx, byte_q_t orig, int k, int m, int kind);
    verdict_t v = decode(rx, k, m);
    int n = rx.size();
    start_page(k, m, 1);
    for (int t = 0; t < n; t++) begin
      din = rx[t];
      @(negedge clk);
    end
    check(page_end && !dec_valid, "verdict not before n+1");
    @(negedge clk);
    check(dec_valid, "verdict at n+1");
    check(no_err == v.no_err && one_err == v.sec && sbed == v.sbed && ded == v.ded,
          $sformatf("verdict k=%0d m=%0d kind=%0d got %b%b%b%b exp %b%b%b%b", k, m, kind,
                    no_err, one_err, sbed, ded, v.no_err, v.sec, v.sbed, v.ded));
    check(two_err == (v.sbed || v.ded), "two_err");
    if (v.sec) begin
      check(int'(err_addr) == v.addr && err_bit == v.bits, "error location");
    end
    // expected class from the injected pattern
    case (kind)
      0, 1: check(no_err, "no-error class");
      2, 3: check(one_err, $sformatf("correctable class k=%0d m=%0d kind=%0d flags %b%b%b%b", k, m, kind, no_err, one_err, sbed, ded));
      4:    check(sbed, "single-byte even error class");
      5:    check(two_err, $sformatf("uncorrectable class k=%0d m=%0d flags %b%b%b%b", k, m, no_err, one_err, sbed, ded));
      default: ;
    endcase
    if (no_err) begin if (kind == 1) n_parerr++; else n_noerr++; end
    if (one_err) begin if (kind == 3) n_sodd++; else n_sec++; end
    if (sbed) n_sbed++;
    if (ded) n_ded++;
    // random-access reads through the corrector
    for (int a = 0; a < k; a++) begin
      int ra = (a * 7 + 3) % k;
      read_addr = ADDR_W'(ra);
      @(negedge clk);
      if (kind <= 3) begin
        check(dec_dout === orig[ra], $sformatf("read %0d got %h exp %h", ra, dec_dout, orig[ra]));
        if (kind >= 2 && ra == v.addr && dec_dout === orig[ra]) n_corrected++;
      end else begin
        check(dec_dout === rx[ra], "uncorrected read");
      end
    end
  endtask

  task automatic run_case(int k, int m);
    byte_q_t d, cw, rx;
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    write_page(d, k, m);
    cw = encode(d, k, m);
    for (int kind = 0; kind <= 5; kind++) begin
      int b1, b2, i1, i2;
      b1 = $urandom_range(k - 1);
      b2 = (b1 + 1 + $urandom_range(k - 2)) % k;
      i1 = $urandom_range(m - 1);
      i2 = $urandom_range(m - 1);
      rx = cw;
      case (kind)
        // one bit of the column byte or the first row bit (bits of the
        // last row byte beyond 2X are padding and not checked)
        1: if (i2 % 2 == 0) rx[k][i1] ^= 1'b1;
           else rx[k+1][0] ^= 1'b1;
        2: rx[b1][i1] ^= 1'b1;
        3: if (m >= 3) begin
             rx[b1][0] ^= 1'b1; rx[b1][1] ^= 1'b1; rx[b1][m-1] ^= 1'b1;
           end else rx[b1][0] ^= 1'b1;
        4: if (m >= 2) begin rx[b1][0] ^= 1'b1; rx[b1][m-1] ^= 1'b1; end
           else continue;
        5: begin
             rx[b1][i1] ^= 1'b1;
             rx[b2][i2] ^= 1'b1;
           end
        default: ;
      endcase
      read_page(rx, d, k, m, kind);
    end
  endtask

  initial begin
    // k = 256, m = 8: the (259, 256, 8) setting of the waveform examples
    run_case(256, 8);
    run_case(4, 4);
    run_case(2, 1);
    run_case(16, 8);
    run_case(17, 8);
    run_case(63, 8);
    run_case(100, 3);
    run_case(33, 5);
    run_case(64, 8);
    run_case(128, 8);
    run_case(4096, 8);
    run_case(1000, 7);
    // out-of-range Ki: the codec stays idle
    start_page(1, 8, 0);
    repeat (5) @(negedge clk);
    check(!page_end && !ctl_o && enc_dout == 0, "Ki=1 idle");
    if (!page_end) n_idle++;
    $display("events: no_err=%0d parity_err=%0d sec=%0d sodd=%0d sbed=%0d ded=%0d corrected=%0d idle=%0d",
             n_noerr, n_parerr, n_sec, n_sodd, n_sbed, n_ded, n_corrected, n_idle);
    check(n_noerr > 0, "no-error case seen");
    check(n_parerr > 0, "parity-area error seen");
    check(n_sec > 0, "single-bit correction seen");
    check(n_sodd > 0, "odd-bit correction seen");
    check(n_sbed > 0, "single-byte detection seen");
    check(n_ded > 0, "double-error detection seen");
    check(n_corrected > 0, "corrected read seen");
    check(n_idle > 0, "idle setting seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
