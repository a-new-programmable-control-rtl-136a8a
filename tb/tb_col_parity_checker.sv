// tb_col_parity_checker: the column syndrome is taken only in the
// column-parity phase, masked to the active lanes and held afterwards.
module tb_col_parity_checker;
  import ecc_pkg::*;
  logic clk = 0, clrb = 0, en = 1;
  phase_t phase = PH_DATA;
  logic [DATA_W-1:0] din = '0, lanes = '1, col = '0, s_col;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  col_parity_checker dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      bit [7:0] e;
      int m;
      m = $urandom_range(1, 8);
      @(negedge clk);
      clrb = 0;
      @(negedge clk);
      clrb = 1; lanes = 8'((1 << m) - 1);
      phase = PH_DATA; din = 8'($urandom); col = 8'($urandom);
      @(negedge clk);
      checks++; if (s_col != 0) failures++;
      phase = PH_COLP; din = 8'($urandom); col = 8'($urandom);
      e = (din ^ col) & lanes;
      en = ($urandom_range(7) != 0);
      @(negedge clk);
      if (!en) e = 0;
      en = 1;
      phase = PH_ROWP; din = 8'($urandom);
      @(negedge clk);
      checks++;
      if (s_col !== e) begin
        failures++;
        if (failures < 10) $display("FAIL s_col=%h exp %h", s_col, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
