// tb_ecc_codec_system: end-to-end test of the top level at its default size
// (no parameters set: 4096-byte buffers). It alternates the two codes on
// the same pins and counts that every mechanism happened at least once.
// Byte code (ilv = 0): for several (k, m) settings a page is written (every
// encoder byte, the CTL window and END at cycle n checked against the
// reference), then read back with no error, a parity-byte error, one bit,
// three bits in one byte, two bits in one byte and two bits in different
// bytes; the verdict at n+1 and every random-access read are checked, and
// the interleaved code's flags must stay low. Interleaved code (ilv = 1):
// the (7, 4, 2, 4) and (66, 63, 8, 8) settings among others, also four
// (66, 63, 8, 8) codes interleaved over four pages, read back with no
// error, one bit, a whole byte, a burst inside one symbol group and two
// bits of one lane; each code's and lane's verdict and every read are
// checked. Out-of-range settings must leave either code idle. Cycle-count
// watchdog; ends with the TB_RESULT line.
module tb_ecc_codec_system;
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
  logic              ilv = 0;
  logic [MI_W-1:0]   mli = '0;
  logic [LS_W-1:0]   ls = '0;
  logic [DATA_W-1:0] lane_sec, lane_unc;
  logic [MAX_L-1:0][DATA_W-1:0] code_sec, code_unc;
  logic [MAX_L-1:0][DATA_W-1:0][ADDR_W-1:0] err_sym;
  logic [MAX_L-1:0][DATA_W-1:0][DATA_W-1:0] err_pat;

  int checks = 0, failures = 0;
  int n_noerr = 0, n_parerr = 0, n_sec = 0, n_sodd = 0, n_sbed = 0, n_ded = 0, n_idle = 0;
  int n_corrected = 0;
  int i_clean = 0, i_corr = 0, i_byte = 0, i_burst = 0, i_unc = 0, i_idle = 0, i_ilv = 0;

  ecc_codec_system dut (.*);

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
    ilv = 1'b0;
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
    check(lane_sec == 0 && lane_unc == 0, "interleaved code idle in byte mode");
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

  task automatic start_ilv_page(int m, int kl, int ml, int lsv, bit dec);
    @(negedge clk);
    ilv = 1'b1;
    mi = MI_W'(m - 1); mli = MI_W'(ml - 1); ki = KI_W'(kl); ls = LS_W'(lsv);
    en_enc = 1; en_dec = dec; clrb = 0;
    @(negedge clk);
    clrb = 1;
  endtask

  // one setting: m lanes, k_l symbols of m_l bits, l = 2^lsv codes
  task automatic run_ilv_case(int m, int kl, int ml, int lsv);
    byte_q_t d, cw, rx;
    int l = 1 << lsv;
    int grp = ml * l;            // bytes per symbol group
    int k = kl * ml * l;         // data bytes in the stream
    int n;
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    cw = mbl_encode_l(d, m, kl, ml, l);
    n = cw.size();
    // write
    start_ilv_page(m, kl, ml, lsv, 0);
    for (int t = 0; t < n; t++) begin
      din = (t < k) ? d[t] : 8'($urandom);
      #1;
      check(enc_dout === cw[t], $sformatf("enc byte %0d got %h exp %h (m=%0d kl=%0d ml=%0d l=%0d)",
                                          t, enc_dout, cw[t], m, kl, ml, l));
      check(ctl_o == (t >= k) && !page_end, "ctl/end window");
      @(negedge clk);
    end
    check(page_end, $sformatf("END after n=%0d", n));
    // reads with injected errors
    for (int kind = 0; kind <= 4; kind++) begin
      int b1, b2, lane;
      bit [7:0] exp_fix [$];
      bit any_sec = 0, any_unc = 0;
      b1 = $urandom_range(k - 1);
      lane = $urandom_range(m - 1);
      rx = cw;
      case (kind)
        1: rx[b1][lane] ^= 1'b1;
        2: rx[b1] ^= mmask(m);
        3: begin
             // a burst over one symbol group (m_l * l consecutive bytes):
             // an odd number of flips in every lane of every code
             int s0 = (b1 / grp) * grp;
             for (int f = 0; f < l; f++)
               for (int i = 0; i < m; i++) begin
                 bit [7:0] pat;
                 pat = 8'($urandom) & 8'((1 << ml) - 1);
                 if (!(^pat)) pat[$urandom_range(ml - 1)] ^= 1'b1;
                 for (int h = 0; h < ml; h++) rx[s0 + h*l + f][i] ^= pat[h];
               end
           end
        4: begin
             // same lane, same code, another symbol
             b2 = (b1 + grp * (1 + $urandom_range(kl - 2))) % k;
             rx[b1][lane] ^= 1'b1;
             rx[b2][lane] ^= 1'b1;
           end
        default: ;
      endcase
      start_ilv_page(m, kl, ml, lsv, 1);
      for (int t = 0; t < n; t++) begin
        din = rx[t];
        @(negedge clk);
      end
      check(!dec_valid, "verdict not before n+1");
      @(negedge clk);
      check(dec_valid, "verdict at n+1");
      for (int j = 0; j < k; j++) exp_fix.push_back(8'h00);
      for (int f = 0; f < MAX_L; f++) begin
        byte_q_t cs;
        if (f < l) cs = code_stream(rx, f, kl, ml, l);
        for (int i = 0; i < DATA_W; i++) begin
          verdict_t v;
          if (f < l && i < m) v = lane_verdict(cs, i, kl, ml);
          else v = '{no_err: 1'b1, sec: 1'b0, sbed: 1'b0, ded: 1'b0, addr: 0, bits: 8'h00};
          check(code_sec[f][i] == v.sec && code_unc[f][i] == (v.sbed || v.ded),
                $sformatf("code %0d lane %0d verdict kind=%0d got %b%b exp %b%b", f, i, kind,
                          code_sec[f][i], code_unc[f][i], v.sec, v.sbed || v.ded));
          if (v.sec) begin
            check(int'(err_sym[f][i]) == v.addr && err_pat[f][i] == v.bits, "error location");
            any_sec = 1;
            for (int h = 0; h < ml; h++)
              if (v.bits[h] && (v.addr * ml + h) * l + f < k)
                exp_fix[(v.addr * ml + h) * l + f][i] = 1'b1;
          end
          if (v.sbed || v.ded) any_unc = 1;
        end
      end
      for (int i = 0; i < DATA_W; i++)
        check(lane_sec[i] == (code_sec[0][i] | code_sec[1][i] | code_sec[2][i] | code_sec[3][i]) &&
              lane_unc[i] == (code_unc[0][i] | code_unc[1][i] | code_unc[2][i] | code_unc[3][i]),
              "lane summary");
      check(!sbed && !ded, "byte code idle in interleaved mode");
      check(two_err == any_unc && one_err == (any_sec && !any_unc) &&
            no_err == (!any_sec && !any_unc), "summary flags");
      case (kind)
        0: begin check(no_err, "clean page"); i_clean++; end
        1: begin check(one_err, "single bit corrected"); if (one_err) i_corr++; end
        2: begin check(one_err, "single byte corrected"); if (one_err) i_byte++; end
        3: begin
             check(one_err, "burst inside one symbol group corrected");
             if (one_err) begin if (l > 1) i_ilv++; else i_burst++; end
           end
        4: begin check(two_err, "double error in a lane detected"); if (two_err) i_unc++; end
        default: ;
      endcase
      for (int a = 0; a < k; a++) begin
        read_addr = ADDR_W'(a);
        @(negedge clk);
        check(dec_dout === (rx[a] ^ exp_fix[a]), $sformatf("read %0d got %h exp %h", a, dec_dout, rx[a] ^ exp_fix[a]));
        if (kind <= 3) check(dec_dout === d[a], "read equals written data");
      end
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
    run_ilv_case(4, 4, 2, 0);     // (7, 4, 2, 4)
    run_ilv_case(8, 63, 8, 0);    // (66, 63, 8, 8), 528-byte page
    run_case(64, 8);              // back to the byte code
    run_ilv_case(8, 63, 8, 2);    // four (66, 63, 8, 8) codes over four pages
    run_ilv_case(8, 100, 5, 0);
    run_ilv_case(8, 512, 8, 0);   // 4096 data bytes
    run_ilv_case(2, 2, 1, 1);
    start_ilv_page(8, 600, 8, 0, 0);  // 4800 bytes: beyond the buffer
    repeat (5) @(negedge clk);
    check(!page_end && !ctl_o && enc_dout == 0, "oversized interleaved page idle");
    if (!page_end) i_idle++;
    $display("interleaved events: clean=%0d bit=%0d byte=%0d burst=%0d multi_page_burst=%0d lane_double=%0d idle=%0d",
             i_clean, i_corr, i_byte, i_burst, i_ilv, i_unc, i_idle);
    check(i_clean > 0, "interleaved clean page seen");
    check(i_corr > 0, "interleaved single-bit correction seen");
    check(i_byte > 0, "interleaved whole-byte correction seen");
    check(i_burst > 0, "interleaved burst correction seen");
    check(i_ilv > 0, "multi-page burst correction seen");
    check(i_unc > 0, "interleaved double error detection seen");
    check(i_idle > 0, "interleaved idle setting seen");
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
