// tb_enc_output_mux: random phases, offsets and data; checks the selected
// byte (data, column byte, m-bit slice of the row vector) and the selects.
module tb_enc_output_mux;
  import ecc_pkg::*;
  phase_t phase = PH_IDLE;
  logic [ROFS_W-1:0] rofs = '0;
  logic [DATA_W-1:0] din = '0, lanes = '1, col = '0, dout;
  logic [ROW_W-1:0] row = '0;
  logic [1:0] parity_sw;
  logic data_sw;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  enc_output_mux dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      bit [7:0] e;
      int m;
      m = $urandom_range(1, 8);
      phase = phase_t'($urandom_range(0, 4));
      rofs = ROFS_W'($urandom_range(0, 23));
      din = 8'($urandom); col = 8'($urandom); row = 24'($urandom);
      lanes = 8'((1 << m) - 1);
      @(posedge clk);
      case (phase)
        PH_DATA: e = din;
        PH_COLP: e = col;
        PH_ROWP: for (int i = 0; i < 8; i++) e[i] = (rofs + i < 24) ? row[rofs+i] : 1'b0;
        default: e = 0;
      endcase
      e &= lanes;
      checks++;
      if (dout !== e || data_sw != (phase == PH_DATA) ||
          parity_sw != {phase == PH_ROWP, phase == PH_COLP}) begin
        failures++;
        if (failures < 10) $display("FAIL phase=%0d dout=%h exp %h", phase, dout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
