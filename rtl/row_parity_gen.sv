// row_parity_gen: row parity-bit generator (X pairs).
//
// For pair x (1..X) the generator keeps R'_x, the XOR of all bits of the
// information bytes whose address j has bit x-1 equal to 0, and R_x, the same
// for address bit x-1 equal to 1 (j mod 2^x in the lower or upper half).
// Each cycle with Load high the parity of the incoming byte (its m active
// bits) is XORed into one register of every active pair, chosen by the
// address bit from the code-length counter. Pairs at or above X (set by Ki)
// are held clear, as is everything during CLRB. The result is packed with
// R'_x at bit 2(x-1) and R_x at bit 2(x-1)+1 and is final from cycle k.
// The per-pair structure (XOR, 2:1 multiplexer, flip-flop, address bit
// steering) follows the codec's pair schematic; feeding it the parity of
// the whole byte follows the row-parity equations.
module row_parity_gen
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              load,
  input  logic [ADDR_W-1:0] addr,   // byte address j
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,
  input  logic [XP_W-1:0]   xp,     // X
  output logic [ROW_W-1:0]  row     // {R_X, R'_X, ..., R_1, R'_1}
);

  logic bpar;
  assign bpar = ^(din & lanes);

  always_ff @(posedge clk) begin
    for (int x = 0; x < MAX_X; x++) begin
      if (!clrb || (x >= int'(xp))) begin
        row[2*x]   <= 1'b0;
        row[2*x+1] <= 1'b0;
      end else if (load) begin
        if (addr[x]) row[2*x+1] <= row[2*x+1] ^ bpar;
        else         row[2*x]   <= row[2*x]   ^ bpar;
      end
    end
  end

endmodule
