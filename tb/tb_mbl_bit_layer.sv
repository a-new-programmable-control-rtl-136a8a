// tb_mbl_bit_layer: checks one lane of the interleaved code on its own,
// with the sequencer signals driven by the testbench. For several
// (m_l, k_l) settings it loads a random bit stream (bit j at position
// j mod m_l of symbol j / m_l) and compares each parity bit t = 0..R-1
// with C_h = XOR of bits with j mod m_l = h and R'_x / R_x = XOR of bits
// whose symbol has bit x-1 clear / set, in the order C_0..C_{m_l-1}, R'_1,
// R_1, R'_2, ... Then it reloads the stream with random bits flipped,
// presents the stored parity bits with dec_en, and checks the column and
// row syndromes against the model. The settings are (m_l, k_l) values of
// the document's examples ((2, 4), (8, 63)) plus other fixed and 80 random
// ones chosen for this test. Cycle-count watchdog; ends with the TB_RESULT
// line.
module tb_mbl_bit_layer;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic              clk = 0, clrb = 0, dec_en = 0, load = 0, din = 0;
  phase_t            phase = PH_IDLE;
  logic [2:0]        h = '0;
  logic [ADDR_W-1:0] sym = '0;
  logic [ROFS_W-1:0] t = '0;
  logic [MI_W-1:0]   mli = '0;
  logic [XP_W-1:0]   xp = '0;
  logic              par_bit;
  logic [DATA_W-1:0] s_col;
  logic [ROW_W-1:0]  s_row;

  int checks = 0, failures = 0;

  mbl_bit_layer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // parity vector C_0..C_{ml-1}, R'_1, R_1, ... of a bit stream
  function automatic bit [31:0] ref_par(bit b[], int ml, int kl);
    bit [31:0] p;
    int x = xp_of(kl);
    p = '0;
    for (int j = 0; j < kl * ml; j++) begin
      p[j % ml] ^= b[j];
      for (int q = 0; q < x; q++)
        p[ml + 2*q + ((j / ml) >> q & 1)] ^= b[j];
    end
    return p;
  endfunction

  task automatic feed(bit b[], int ml, int kl);
    @(negedge clk);
    clrb = 0; load = 0; dec_en = 0; phase = PH_DATA;
    mli = MI_W'(ml - 1); xp = XP_W'(xp_of(kl));
    @(negedge clk);
    clrb = 1;
    for (int j = 0; j < kl * ml; j++) begin
      load = 1; din = b[j]; h = 3'(j % ml); sym = ADDR_W'(j / ml);
      @(negedge clk);
    end
    load = 0;
    phase = PH_ROWP;
  endtask

  task automatic run(int ml, int kl);
    int k = kl * ml;
    int r = ml + 2 * xp_of(kl);
    bit b[], e[];
    bit [31:0] p, q, s;
    b = new[k];
    foreach (b[j]) b[j] = 1'($urandom);
    p = ref_par(b, ml, kl);
    feed(b, ml, kl);
    for (int i = 0; i < r; i++) begin
      t = ROFS_W'(i);
      #1;
      check(par_bit === p[i], $sformatf("parity bit %0d ml=%0d kl=%0d", i, ml, kl));
      @(negedge clk);
    end
    // decode with 1..3 flipped data bits and maybe a flipped parity bit
    for (int rep = 0; rep < 8; rep++) begin
      int nf = 1 + $urandom_range(2);
      int pf = $urandom_range(r + r - 1);
      e = b;
      for (int f = 0; f < nf; f++) begin
        int j = $urandom_range(k - 1);
        e[j] = !e[j];
      end
      q = ref_par(e, ml, kl);
      feed(e, ml, kl);
      dec_en = 1;
      for (int i = 0; i < r; i++) begin
        t = ROFS_W'(i);
        din = p[i] ^ (pf == i);
        @(negedge clk);
      end
      dec_en = 0;
      s = q ^ p;
      if (pf < r) s[pf] = !s[pf];
      check(s_col === DATA_W'(s & ((32'd1 << ml) - 1)) &&
            s_row === ROW_W'((s >> ml) & ((32'd1 << (r - ml)) - 1)),
            $sformatf("syndromes ml=%0d kl=%0d", ml, kl));
    end
  endtask

  initial begin
    run(2, 4);
    run(8, 63);
    run(1, 2);
    run(3, 17);
    run(5, 100);
    run(8, 512);
    run(1, 4096);
    run(4, 1000);
    // random settings: k_l 2..100, m_l 1..8 (this test's choice)
    for (int c = 0; c < 80; c++)
      run(1 + int'($urandom % 8), 2 + int'($urandom % 99));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
