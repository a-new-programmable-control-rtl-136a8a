// syndrome_generator: the decoder's syndrome unit, made of the column
// parity-bits checker and the row parity-bits checker. It compares the
// stored parity bytes of a page with the parity the encoder's generators
// rebuilt from the received information bytes. s_col is ready one cycle
// after the column-parity byte, s_row once the page reaches PH_END.
module syndrome_generator
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              en,
  input  ctl_t              ctl,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,
  input  logic [XP_W-1:0]   xp,
  input  logic [DATA_W-1:0] col,
  input  logic [ROW_W-1:0]  row,
  output logic [DATA_W-1:0] s_col,
  output logic [ROW_W-1:0]  s_row
);

  col_parity_checker u_colchk (
    .clk(clk), .clrb(clrb), .en(en), .phase(ctl.phase), .din(din),
    .lanes(lanes), .col(col), .s_col(s_col)
  );

  row_parity_checker u_rowchk (
    .clk(clk), .clrb(clrb), .en(en), .phase(ctl.phase), .rofs(ctl.rofs),
    .din(din), .lanes(lanes), .xp(xp), .row(row), .s_row(s_row)
  );

endmodule
