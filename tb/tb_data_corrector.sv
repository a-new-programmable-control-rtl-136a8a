// tb_data_corrector: presents read addresses with a one-cycle-late data
// word and checks that only the error address, and only when the page is
// correctable, has its error bits inverted.
module tb_data_corrector;
  logic clk = 0, sec = 0;
  logic [11:0] raddr = '0, err_addr = '0;
  logic [7:0] rdata = '0, err_bit = '0, dout;
  int checks = 0, failures = 0, hits = 0;
  always #5 clk = ~clk;

  data_corrector dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] prev = '0;
    for (int t = 0; t < 5000; t++) begin
      bit [7:0] e;
      @(negedge clk);
      sec = $urandom_range(3) != 0;
      err_addr = 12'($urandom_range(15));
      err_bit = 8'($urandom);
      raddr = 12'($urandom_range(15));
      prev = raddr;
      @(negedge clk);
      rdata = 8'($urandom);
      raddr = 12'($urandom_range(15));
      #1;
      e = rdata ^ ((sec && prev == err_addr) ? err_bit : 8'h00);
      if (sec && prev == err_addr) hits++;
      checks++;
      if (dout !== e) begin
        failures++;
        if (failures < 10) $display("FAIL dout=%h exp %h", dout, e);
      end
    end
    checks++; if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
