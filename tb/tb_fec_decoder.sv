// tb_fec_decoder: the decoder runs beside the encoder that supplies its
// counter and regenerated parity, as in the codec. Random codewords with
// injected errors (none, one bit, three bits in a byte, two bits in a
// byte, bits in two bytes) are read in; the verdict is checked at cycle
// n+1 against the reference decoder, and all k bytes are read back through
// the corrector.
module tb_fec_decoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, clrb = 0, en = 0;
  logic [MI_W-1:0] mi = '0;
  logic [KI_W-1:0] ki = '0;
  logic [DATA_W-1:0] din = '0, enc_dout, lanes, col, dec_dout, err_bit;
  logic ctl_o, page_end, no_err, one_err, two_err, sbed, ded, valid;
  ctl_t ctl;
  logic [XP_W-1:0] xp;
  logic [ROW_W-1:0] row;
  logic [ADDR_W-1:0] read_addr = '0, err_addr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fec_encoder u_enc (.clk(clk), .clrb(clrb), .en(en), .mi(mi), .ki(ki), .din(din),
    .enc_dout(enc_dout), .ctl_o(ctl_o), .page_end(page_end), .ctl(ctl),
    .lanes(lanes), .xp(xp), .col(col), .row(row));
  fec_decoder dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(int k, int m, int kind);
    byte_q_t d, cw;
    verdict_t v;
    int n, b1, b2;
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    cw = encode(d, k, m);
    n = cw.size();
    b1 = $urandom_range(k - 1);
    b2 = (b1 + 1 + $urandom_range(k - 2)) % k;
    case (kind)
      1: cw[b1][0] ^= 1'b1;
      2: begin cw[b1][0] ^= 1'b1; cw[b1][1] ^= 1'b1; cw[b1][2] ^= 1'b1; end
      3: begin cw[b1][1] ^= 1'b1; cw[b1][m-1] ^= 1'b1; end
      4: begin cw[b1][0] ^= 1'b1; cw[b2][m-1] ^= 1'b1; end
      default: ;
    endcase
    v = decode(cw, k, m);
    @(negedge clk);
    ki = KI_W'(k); mi = MI_W'(m - 1); en = 1; clrb = 0;
    @(negedge clk);
    clrb = 1;
    for (int t = 0; t < n; t++) begin din = cw[t]; @(negedge clk); end
    check(!valid, "not valid at n");
    @(negedge clk);
    check(valid && no_err == v.no_err && one_err == v.sec && sbed == v.sbed && ded == v.ded
          && two_err == (v.sbed || v.ded), $sformatf("verdict k=%0d m=%0d kind=%0d", k, m, kind));
    case (kind)
      0: check(no_err, "class none");
      1, 2: check(one_err && int'(err_addr) == b1, "class correctable");
      3: check(sbed, "class sbed");
      default: check(ded, "class ded");
    endcase
    for (int a = 0; a < k; a++) begin
      read_addr = ADDR_W'(a);
      @(negedge clk);
      check(dec_dout === ((kind <= 2) ? d[a] : cw[a]), $sformatf("read %0d", a));
    end
  endtask

  initial begin
    for (int kind = 0; kind <= 4; kind++) begin
      run(256, 8, kind); run(16, 4, kind); run(33, 3, kind); run(1000, 8, kind);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
