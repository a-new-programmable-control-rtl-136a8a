// tb_fec_encoder: encodes random pages for many (k, m) settings and checks
// every output byte against the reference codeword, the CTL window, that
// END rises after exactly n = k + 1 + ceil(2X/m) cycles, and that unused
// lanes stay 0. Includes the (259, 256, 8) setting of the timing examples.
module tb_fec_encoder;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;
  logic clk = 0, clrb = 0, en = 0;
  logic [MI_W-1:0] mi = '0;
  logic [KI_W-1:0] ki = '0;
  logic [DATA_W-1:0] din = '0, enc_dout, lanes, col;
  logic ctl_o, page_end;
  ctl_t ctl;
  logic [XP_W-1:0] xp;
  logic [ROW_W-1:0] row;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fec_encoder dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int k, int m);
    byte_q_t d, cw;
    int cycles = 0;
    for (int j = 0; j < k; j++) d.push_back(8'($urandom) & mmask(m));
    cw = encode(d, k, m);
    @(negedge clk);
    ki = KI_W'(k); mi = MI_W'(m - 1); en = 1; clrb = 0;
    @(negedge clk);
    clrb = 1;
    while (!page_end && cycles < 5000) begin
      din = (cycles < k) ? (d[cycles] | (8'($urandom) & ~mmask(m))) : 8'($urandom);
      #1;
      checks++;
      if (cycles >= cw.size() || enc_dout !== cw[cycles] || ctl_o != (cycles >= k)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d m=%0d t=%0d got %h", k, m, cycles, enc_dout);
      end
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != nbytes(k, m)) begin
      failures++;
      $display("FAIL k=%0d m=%0d took %0d cycles, expected n=%0d", k, m, cycles, nbytes(k, m));
    end
  endtask

  initial begin
    run(256, 8); run(4, 4); run(2, 1); run(16, 8); run(17, 8); run(255, 6);
    run(257, 8); run(4096, 8); run(1024, 5); run(3, 2); run(64, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
