// tb_syndrome_generator: drives the parity cycles of a page (column byte,
// then row bytes) with random stored and new parity and checks both
// syndromes.
module tb_syndrome_generator;
  import ecc_pkg::*;
  logic clk = 0, clrb = 0, en = 1;
  ctl_t ctl;
  logic [DATA_W-1:0] din = '0, lanes = '1, col = '0, s_col;
  logic [XP_W-1:0] xp = '0;
  logic [ROW_W-1:0] row = '0, s_row;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  syndrome_generator dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl = '0;
    for (int t = 0; t < 300; t++) begin
      int m, x;
      bit [7:0] sc;
      bit [23:0] sr, mask;
      m = $urandom_range(1, 8);
      x = $urandom_range(1, 12);
      sc = 8'($urandom);
      sr = 24'($urandom);
      mask = 24'((1 << (2 * x)) - 1);
      @(negedge clk);
      clrb = 0; ctl.phase = PH_DATA;
      @(negedge clk);
      clrb = 1; lanes = 8'((1 << m) - 1); xp = XP_W'(x);
      col = 8'($urandom); row = 24'($urandom);
      ctl.phase = PH_COLP; din = sc;
      @(negedge clk);
      for (int off = 0; off < 2 * x; off += m) begin
        ctl.phase = PH_ROWP; ctl.rofs = ROFS_W'(off);
        for (int i = 0; i < 8; i++) din[i] = (off + i < 24) ? sr[off+i] : 1'b0;
        @(negedge clk);
      end
      ctl.phase = PH_END;
      @(negedge clk);
      checks += 2;
      if (s_col !== ((sc ^ col) & lanes)) failures++;
      if (s_row !== ((sr ^ row) & mask)) begin
        failures++;
        if (failures < 10) $display("FAIL s_row=%h exp %h", s_row, (sr ^ row) & mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
