// tb_error_type_detector: builds syndromes from injected error patterns on
// a k x m page (a data bit at byte j, lane i flips S_col(i) and, for every
// pair x, S_row(x) or S'_row(x) by address bit x-1 of j) and checks the
// class the code promises: none or one parity-area bit -> no error; one
// bit or an odd number of bits in one byte -> correctable at that address
// with that bit pattern; an even number in one byte -> SBED; bits in two
// different bytes -> DED.
module tb_error_type_detector;
  logic [7:0]  s_col;
  logic [23:0] s_row;
  logic [3:0]  xp;
  logic no_err, sec, sbed, ded;
  logic [11:0] err_addr;
  logic [7:0]  err_bit;
  int checks = 0, failures = 0;
  int seen[4] = '{0, 0, 0, 0};
  logic clk = 0;
  always #5 clk = ~clk;

  error_type_detector dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void inject(int j, bit [7:0] pat, int x,
                                 ref bit [7:0] sc, ref bit [23:0] sr);
    sc ^= pat;
    if ($countones(pat) % 2 == 1)
      for (int b = 0; b < x; b++) sr[2*b + ((j >> b) & 1)] ^= 1'b1;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int kind, m, k, x;
      int j1, j2, exp_class;
      bit [7:0] sc, p1, p2;
      bit [23:0] sr;
      kind = t % 6;
      m = $urandom_range(2, 8);
      k = $urandom_range(2, 4096);
      x = 0;
      sc = 0;
      sr = 0;
      while ((1 << x) < k) x++;
      j1 = $urandom_range(k - 1);
      j2 = (j1 + 1 + $urandom_range(k - 2)) % k;
      p1 = 8'(1 << $urandom_range(m - 1));
      p2 = 8'(1 << $urandom_range(m - 1));
      case (kind)
        0: exp_class = 0;
        1: begin
             if ($urandom_range(1)) sc[$urandom_range(m - 1)] = 1'b1;
             else sr[$urandom_range(2 * x - 1)] = 1'b1;
             exp_class = 0;
           end
        2: begin inject(j1, p1, x, sc, sr); exp_class = 1; end
        3: begin
             if (m < 3) begin inject(j1, p1, x, sc, sr); end
             else begin p1 = 8'b111 << $urandom_range(m - 3); inject(j1, p1, x, sc, sr); end
             exp_class = 1;
           end
        4: begin p1 = 8'b11 << $urandom_range(m - 2); inject(j1, p1, x, sc, sr); exp_class = 2; end
        default: begin inject(j1, p1, x, sc, sr); inject(j2, p2, x, sc, sr); exp_class = 3; end
      endcase
      s_col = sc; s_row = sr; xp = 4'(x);
      @(posedge clk);
      checks++;
      case (exp_class)
        0: if (!(no_err && !sec && !sbed && !ded)) failures++;
        1: if (!(sec && !no_err && int'(err_addr) == j1 && err_bit == p1)) failures++;
        2: if (!(sbed && !sec && !ded)) failures++;
        default: if (!(ded && !sec && !sbed && !no_err)) failures++;
      endcase
      seen[exp_class]++;
    end
    for (int c = 0; c < 4; c++) begin checks++; if (seen[c] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
