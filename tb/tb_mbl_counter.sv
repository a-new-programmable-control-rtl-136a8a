// tb_mbl_counter: checks the interleaved-code sequencer cycle by cycle
// against a model. For several (m_l, k_l, l) settings, with the enable
// dropped at random, data byte c < k = k_l*m_l*l must show PH_DATA,
// address c, code c mod l, position (c / l) mod m_l, symbol c / (m_l*l)
// and load; parity byte q = c - k must show PH_ROWP, code q / R and index
// q mod R (R = m_l + 2X); then PH_END holds until CLRB. X = ceil(log2 k_l)
// is checked, and k_l = 1, k_l = 4097, data above 4096 bytes and ls = 3
// must stay in PH_IDLE. Cycle-count watchdog; ends with the
// TB_RESULT line.
module tb_mbl_counter;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic              clk = 0, clrb = 0, en = 0;
  logic [MI_W-1:0]   mli = '0;
  logic [KI_W-1:0]   kli = '0;
  logic [LS_W-1:0]   ls = '0;
  logic [LS_W-1:0]   f, pf;
  phase_t            phase;
  logic [ADDR_W-1:0] addr, sym;
  logic [2:0]        h;
  logic [ROFS_W-1:0] t;
  logic [XP_W-1:0]   xp;
  logic              load;

  int checks = 0, failures = 0;

  mbl_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500_000) @(posedge clk);
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

  task automatic run(int ml, int kl, int lsv = 0);
    int l = 1 << lsv;
    int k = kl * ml * l;
    int r = ml + 2 * xp_of(kl);
    int c = 0;
    @(negedge clk);
    mli = MI_W'(ml - 1); kli = KI_W'(kl); ls = LS_W'(lsv); clrb = 0; en = 0;
    @(negedge clk);
    clrb = 1;
    check(xp === XP_W'(xp_of(kl)), $sformatf("X for k_l=%0d", kl));
    while (c < k + r * l + 3) begin
      en = ($urandom_range(3) != 0);
      #1;
      if (c < k) begin
        check(phase === PH_DATA && addr === ADDR_W'(c) && f === LS_W'(c % l) &&
              h === 3'((c / l) % ml) && sym === ADDR_W'(c / (ml * l)) && load === en,
              $sformatf("data byte %0d ml=%0d kl=%0d l=%0d", c, ml, kl, l));
      end else if (c < k + r * l) begin
        check(phase === PH_ROWP && pf === LS_W'((c - k) / r) && t === ROFS_W'((c - k) % r) && !load,
              $sformatf("parity byte %0d ml=%0d kl=%0d l=%0d", c - k, ml, kl, l));
      end else begin
        check(phase === PH_END && !load, "end holds");
      end
      @(negedge clk);
      if (en) c++;
    end
  endtask

  task automatic idle(int ml, int kl, int lsv = 0);
    @(negedge clk);
    mli = MI_W'(ml - 1); kli = KI_W'(kl); ls = LS_W'(lsv); clrb = 0; en = 1;
    @(negedge clk);
    clrb = 1;
    repeat (4) begin
      check(phase === PH_IDLE && !load, $sformatf("idle ml=%0d kl=%0d", ml, kl));
      @(negedge clk);
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
    run(7, 585);
    run(8, 63, 2);
    run(2, 4, 1);
    run(3, 17, 2);
    run(1, 2048, 1);
    idle(1, 1);
    idle(1, 4097);
    idle(8, 513);
    idle(2, 0);
    idle(8, 64, 3);
    idle(8, 129, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
