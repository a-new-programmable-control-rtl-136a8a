// tb_code_length_counter: for several (k, m) settings, checks the phase of
// every cycle of a page (k data cycles with addresses 0..k-1, one
// column-parity cycle, ceil(2X/m) row-parity cycles with offsets 0, m,
// 2m, ...), that END is reached after exactly n cycles and held, that a
// low enable freezes the counter, and that an unused Ki stays idle.
module tb_code_length_counter;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, clrb = 0, en = 0, k_valid;
  logic [KI_W-1:0] ki = '0;
  logic [XP_W-1:0] xp;
  logic [MI_W-1:0] mi = '0;
  ctl_t ctl;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  code_length_comparator u_cmp (.ki(ki), .k_valid(k_valid), .xp(xp));
  code_length_counter dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(int k, int m);
    int n = nbytes(k, m);
    @(negedge clk);
    ki = KI_W'(k); mi = MI_W'(m - 1); en = 1; clrb = 0;
    @(negedge clk);
    clrb = 1;
    for (int t = 0; t < n; t++) begin
      if (t < k) check(ctl.phase == PH_DATA && int'(ctl.addr) == t && ctl.load,
                       $sformatf("data k=%0d t=%0d", k, t));
      else if (t == k) check(ctl.phase == PH_COLP && !ctl.load, "col phase");
      else check(ctl.phase == PH_ROWP && int'(ctl.rofs) == (t - k - 1) * m,
                 $sformatf("row k=%0d m=%0d t=%0d rofs=%0d", k, m, t, ctl.rofs));
      // a cycle with the enable low in the middle freezes everything
      if (t == k / 2) begin
        en = 0;
        @(negedge clk);
        check(!ctl.load && int'(ctl.addr) == t, "hold");
        en = 1;
      end
      @(negedge clk);
    end
    check(ctl.phase == PH_END, $sformatf("END after n=%0d", n));
    repeat (3) @(negedge clk);
    check(ctl.phase == PH_END, "END held");
  endtask

  initial begin
    run(2, 1); run(4, 4); run(5, 3); run(16, 8); run(17, 8); run(256, 8);
    run(257, 8); run(100, 7); run(4096, 8); run(4096, 1); run(63, 2);
    @(negedge clk);
    ki = 0; clrb = 0;
    @(negedge clk);
    clrb = 1;
    repeat (4) @(negedge clk);
    check(ctl.phase == PH_IDLE && !ctl.load, "idle for Ki=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
