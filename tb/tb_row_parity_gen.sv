// tb_row_parity_gen: feeds random pages of random length and width with
// addresses 0..k-1 and checks the row vector against the reference code
// (parity of bytes in the lower / upper half of each 2^x block). For pages
// up to 300 bytes the vector is also compared after every byte with a
// running model, with cycles of Load low (vector must hold) mixed in, and
// the clear by CLRB is checked at the start of each page. Page sizes from
// the document (256, 4096) and random ones; all settings are this test's.
module tb_row_parity_gen;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, clrb = 0, load = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [DATA_W-1:0] din = '0, lanes = '1;
  logic [XP_W-1:0] xp = '0;
  logic [ROW_W-1:0] row;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  row_parity_gen dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Running model: the row vector after bytes 0..j of d have been loaded.
  function automatic bit [23:0] partial(byte_q_t d, int upto, int m, int k);
    bit [23:0] r = '0;
    for (int j = 0; j <= upto; j++)
      for (int x = 0; x < xp_of(k); x++)
        if (j[x]) r[2*x+1] ^= ^(d[j] & mmask(m));
        else      r[2*x]   ^= ^(d[j] & mmask(m));
    return r;
  endfunction

  // One page: k bytes of width m; load drops for a cycle now and then (the
  // vector must hold), and every cycle the vector is compared with the
  // running model. At the end it is compared with the reference encoder.
  task automatic run_page(int k, int m, bit gaps);
    byte_q_t d;
    bit [7:0] rc;
    bit [23:0] rr, exp_r;
    d = {};
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    @(negedge clk);
    lanes = mmask(m); xp = XP_W'(xp_of(k)); clrb = 0; load = 1;
    din = 8'($urandom);
    @(negedge clk);
    checks++;
    if (row !== '0) begin
      failures++;
      $display("FAIL k=%0d m=%0d not cleared row=%h", k, m, row);
    end
    clrb = 1;
    exp_r = '0;
    for (int j = 0; j < k; j++) begin
      if (gaps && ($urandom % 4 == 0)) begin
        // load low: noise on the inputs must not change the vector
        load = 0;
        din = 8'($urandom);
        addr = ADDR_W'($urandom);
        @(negedge clk);
        checks++;
        if (row !== exp_r) begin
          failures++;
          $display("FAIL k=%0d m=%0d hold j=%0d row=%h exp %h", k, m, j, row, exp_r);
        end
      end
      // unused lanes carry noise that must be ignored
      din = d[j] | (8'($urandom) & ~mmask(m));
      addr = ADDR_W'(j);
      load = 1;
      @(negedge clk);
      if (k <= 300) begin
        exp_r = partial(d, j, m, k);
        checks++;
        if (row !== exp_r) begin
          failures++;
          $display("FAIL k=%0d m=%0d j=%0d row=%h exp %h", k, m, j, row, exp_r);
        end
      end
    end
    load = 0;
    din = 8'($urandom);
    @(negedge clk);
    parity(d, k, m, rc, rr);
    checks++;
    if (row !== rr) begin
      failures++;
      $display("FAIL k=%0d m=%0d row=%h exp %h", k, m, row, rr);
    end
  endtask

  task automatic run_all();
    int ks[] = '{2, 3, 4, 5, 16, 17, 63, 64, 100, 256, 257, 1000, 2049, 4096};
    int k, m;
    foreach (ks[c]) run_page(ks[c], 1 + c % 8, 1'b0);
    for (int c = 0; c < 120; c++) begin
      k = 2 + int'($urandom % 299);
      m = 1 + int'($urandom % 8);
      run_page(k, m, 1'b1);
    end
  endtask

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
