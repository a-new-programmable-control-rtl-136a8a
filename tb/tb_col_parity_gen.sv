// tb_col_parity_gen: feeds random pages (random m, random load gaps) and
// checks the column parity against a bit-by-bit XOR; also checks the clear.
module tb_col_parity_gen;
  import ecc_pkg::*;
  logic clk = 0, clrb = 0, load = 0;
  logic [DATA_W-1:0] din = '0, lanes = '1, col;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  col_parity_gen dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int page = 0; page < 40; page++) begin
      int m;
      bit [7:0] ref_c;
      m = 1 + page % 8;
      ref_c = '0;
      @(negedge clk);
      lanes = lane_mask(MI_W'(m - 1)); clrb = 0;
      @(negedge clk);
      clrb = 1;
      checks++; if (col != 0) failures++;
      for (int t = 0; t < 50; t++) begin
        din = 8'($urandom);
        load = ($urandom_range(3) != 0);
        if (load) for (int i = 0; i < m; i++) ref_c[i] ^= din[i];
        @(negedge clk);
        checks++;
        if (col !== ref_c) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d col=%h exp %h", m, col, ref_c);
        end
      end
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
