// col_parity_gen: column parity-bit generator.
//
// One register per data-I/O lane i accumulates C_i = XOR over the page of
// bit i of every information byte. Each bit is a flip-flop fed back through
// an XOR with the incoming data bit and a 2:1 multiplexer that selects the
// XOR result while Load is high and holds otherwise; the register is cleared
// by CLRB and held clear for lanes at or above m (set by Mi), as in the
// codec's one-bit generator schematic. The final value is valid from cycle k
// (the column-parity byte). The clear is synchronous here.
module col_parity_gen
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              load,   // information byte present
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,  // active lanes (from Mi)
  output logic [DATA_W-1:0] col     // C_0..C_{m-1}
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < DATA_W; i++) begin
      if (!clrb || !lanes[i]) col[i] <= 1'b0;
      else if (load)          col[i] <= col[i] ^ din[i];
    end
  end

endmodule
