// tb_ram_buffer: writes random data to random addresses, keeps a copy, and
// checks registered reads (data the cycle after the address), including a
// full sweep of all 4096 words.
module tb_ram_buffer;
  logic clk = 0, we = 0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [4096];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ram_buffer dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      we = 1; waddr = 12'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      we = $urandom_range(1); waddr = 12'($urandom); wdata = 8'($urandom);
      raddr = 12'($urandom);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
