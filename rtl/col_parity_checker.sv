// col_parity_checker: column half of the syndrome unit.
//
// In the column-parity cycle (cycle k) of a page being read, the stored
// column-parity byte arrives on din while the column generator holds the
// column parity of the k information bytes just received. Their XOR over
// the m active lanes is the column syndrome S_col(i) = b_ik + C_i, which
// marks the bit positions in error; it is registered and stays until CLRB.
module col_parity_checker
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              en,     // EN_DEC
  input  phase_t            phase,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,
  input  logic [DATA_W-1:0] col,    // newly generated C
  output logic [DATA_W-1:0] s_col
);

  always_ff @(posedge clk) begin
    if (!clrb)                         s_col <= '0;
    else if (en && phase == PH_COLP)   s_col <= (din ^ col) & lanes;
  end

endmodule
