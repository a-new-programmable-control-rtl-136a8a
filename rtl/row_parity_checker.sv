// row_parity_checker: row half of the syndrome unit.
//
// During the row-parity cycles (k+1..n-1) of a page being read, the stored
// row-parity bits arrive m per byte. Each byte's m active bits are placed at
// offset rofs of a 24-bit register, rebuilding the stored row vector in the
// same layout the encoder sent it. The row syndrome is that vector XOR the
// newly generated one, limited to the 2X used bits: bit 2(x-1) is S'_row(x)
// and bit 2(x-1)+1 is S_row(x). It is complete once PH_END is reached.
module row_parity_checker
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              en,     // EN_DEC
  input  phase_t            phase,
  input  logic [ROFS_W-1:0] rofs,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,
  input  logic [XP_W-1:0]   xp,
  input  logic [ROW_W-1:0]  row,    // newly generated R
  output logic [ROW_W-1:0]  s_row
);

  logic [ROW_W-1:0] old_q;
  logic [ROW_W-1:0] rmask;
  logic [ROW_W-1:0] placed;

  assign rmask  = row_mask(xp);
  assign placed = ROW_W'(din & lanes) << rofs;

  always_ff @(posedge clk) begin
    if (!clrb)                       old_q <= '0;
    else if (en && phase == PH_ROWP) old_q <= old_q | (placed & rmask);
  end

  assign s_row = (old_q ^ row) & rmask;

endmodule
