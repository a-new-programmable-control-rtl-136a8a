// tb_row_parity_checker: sends a random stored row vector m bits per byte
// (offsets 0, m, 2m, ...) with noise in the unused lanes and padding, and
// checks the syndrome against stored XOR new over the 2X used bits.
module tb_row_parity_checker;
  import ecc_pkg::*;
  logic clk = 0, clrb = 0, en = 1;
  phase_t phase = PH_DATA;
  logic [ROFS_W-1:0] rofs = '0;
  logic [DATA_W-1:0] din = '0, lanes = '1;
  logic [XP_W-1:0] xp = '0;
  logic [ROW_W-1:0] row = '0, s_row;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  row_parity_checker dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      int m, x;
      bit [23:0] stored, mask, e;
      m = $urandom_range(1, 8);
      x = $urandom_range(1, 12);
      stored = 24'($urandom);
      mask = 24'((1 << (2 * x)) - 1);
      @(negedge clk);
      clrb = 0; phase = PH_DATA;
      @(negedge clk);
      clrb = 1; lanes = 8'((1 << m) - 1); xp = XP_W'(x); row = 24'($urandom);
      for (int off = 0; off < 2 * x; off += m) begin
        phase = PH_ROWP; rofs = ROFS_W'(off);
        for (int i = 0; i < 8; i++)
          din[i] = (i < m && off + i < 2 * x) ? stored[off+i] : 1'($urandom);
        @(negedge clk);
      end
      phase = PH_END; din = 8'($urandom);
      @(negedge clk);
      e = (stored ^ row) & mask;
      checks++;
      if (s_row !== e) begin
        failures++;
        if (failures < 10) $display("FAIL m=%0d x=%0d s_row=%h exp %h", m, x, s_row, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
