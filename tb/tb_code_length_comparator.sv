// tb_code_length_comparator: sweeps every 13-bit Ki value and checks X =
// ceil(log2 k) and the 2..4096 valid range against a direct computation.
module tb_code_length_comparator;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic [KI_W-1:0] ki;
  logic            k_valid;
  logic [XP_W-1:0] xp;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  code_length_comparator dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8192; k++) begin
      ki = KI_W'(k);
      @(posedge clk);
      checks++;
      if (k_valid != (k >= 2 && k <= 4096)) failures++;
      if (k >= 2 && k <= 4096) begin
        checks++;
        if (int'(xp) != xp_of(k)) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d xp=%0d exp %0d", k, xp, xp_of(k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
