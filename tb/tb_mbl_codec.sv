// tb_mbl_codec: end-to-end test of the multi-bit-layer interleaved codec.
// The reference (ecc_ref_pkg) treats each data-I/O lane as a byte-code
// page of k_l symbols m_l bits wide and reuses the byte-code equations to
// get that lane's parity and verdict; interleaved codes are first split
// into their byte subsequences. Settings: the (7, 4, 2, 4) example, the
// (66, 63, 8, 8) 528-byte NAND page, four (66, 63, 8, 8) codes interleaved
// over four pages, and others. For each it writes the stream (every output
// byte and n = (k + R) * l checked), then reads it back with: no error,
// one bit, one whole byte (a bit in every lane), a burst over the
// m_l * l bytes of one symbol group with an odd number of flips in every
// lane of every code, and two bits of one lane and code in different
// symbols. It checks every code's and lane's verdict and error location,
// the summary flags, and every byte read back one cycle after its address.
// Settings that cannot run must leave the codec idle. Cycle-count
// watchdog; ends with the TB_RESULT line.
module tb_mbl_codec;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic              clk = 0;
  logic              clrb = 0, en_enc = 0, en_dec = 0;
  logic [MI_W-1:0]   mi = '0, mli = '0;
  logic [KI_W-1:0]   kli = '0;
  logic [DATA_W-1:0] din = '0;
  logic [ADDR_W-1:0] read_addr = '0;
  logic [DATA_W-1:0] enc_dout, dec_dout, lane_sec, lane_unc;
  logic              ctl_o, page_end, dec_valid, no_err, one_err, two_err;
  logic [LS_W-1:0]   ls = '0;
  logic [MAX_L-1:0][DATA_W-1:0] code_sec, code_unc;
  logic [MAX_L-1:0][DATA_W-1:0][ADDR_W-1:0] err_sym;
  logic [MAX_L-1:0][DATA_W-1:0][DATA_W-1:0] err_pat;

  int checks = 0, failures = 0;
  int n_clean = 0, n_corr = 0, n_byte = 0, n_burst = 0, n_unc = 0, n_ilv = 0, n_idle = 0;

  mbl_codec dut (.*);

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

  task automatic start_page(int m, int kl, int ml, int lsv, bit dec);
    @(negedge clk);
    mi = MI_W'(m - 1); mli = MI_W'(ml - 1); kli = KI_W'(kl); ls = LS_W'(lsv);
    en_enc = 1; en_dec = dec; clrb = 0;
    @(negedge clk);
    clrb = 1;
  endtask

  // one setting: m lanes, k_l symbols of m_l bits, l = 2^lsv codes
  task automatic run_case(int m, int kl, int ml, int lsv);
    byte_q_t d, cw, rx;
    int l = 1 << lsv;
    int grp = ml * l;            // bytes per symbol group
    int k = kl * ml * l;         // data bytes in the stream
    int n;
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    cw = mbl_encode_l(d, m, kl, ml, l);
    n = cw.size();
    // write
    start_page(m, kl, ml, lsv, 0);
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
      start_page(m, kl, ml, lsv, 1);
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
      check(two_err == any_unc && one_err == (any_sec && !any_unc) &&
            no_err == (!any_sec && !any_unc), "summary flags");
      case (kind)
        0: begin check(no_err, "clean page"); n_clean++; end
        1: begin check(one_err, "single bit corrected"); if (one_err) n_corr++; end
        2: begin check(one_err, "single byte corrected"); if (one_err) n_byte++; end
        3: begin
             check(one_err, "burst inside one symbol group corrected");
             if (one_err) begin if (l > 1) n_ilv++; else n_burst++; end
           end
        4: begin check(two_err, "double error in a lane detected"); if (two_err) n_unc++; end
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
    run_case(4, 4, 2, 0);     // (7, 4, 2, 4), the worked example
    run_case(8, 63, 8, 0);    // (66, 63, 8, 8) for a 528-byte page
    run_case(8, 100, 5, 0);
    run_case(3, 17, 3, 0);
    run_case(8, 512, 8, 0);   // 4096 data bytes
    run_case(1, 2, 1, 0);
    run_case(8, 63, 8, 2);    // four (66, 63, 8, 8) codes over four pages
    run_case(4, 4, 2, 1);
    run_case(5, 30, 3, 2);
    run_case(2, 2, 1, 2);
    // settings outside the buffer or ls = 3 leave the codec idle
    start_page(8, 64, 8, 3, 0);
    repeat (5) @(negedge clk);
    check(!page_end && !ctl_o && enc_dout == 0, "ls=3 idle");
    if (!page_end) n_idle++;
    start_page(8, 130, 8, 2, 0);
    repeat (5) @(negedge clk);
    check(!page_end && !ctl_o && enc_dout == 0, "oversized stream idle");
    if (!page_end) n_idle++;
    $display("events: clean=%0d bit=%0d byte=%0d burst=%0d interleaved_burst=%0d lane_double=%0d idle=%0d",
             n_clean, n_corr, n_byte, n_burst, n_ilv, n_unc, n_idle);
    check(n_clean > 0, "clean page seen");
    check(n_corr > 0, "single-bit correction seen");
    check(n_byte > 0, "whole-byte correction seen");
    check(n_burst > 0, "burst correction seen");
    check(n_ilv > 0, "burst over interleaved codes corrected");
    check(n_unc > 0, "double error detection seen");
    check(n_idle == 2, "idle settings seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
