// fec_encoder: programmable (n, k, m) SEC-SoddEC-SBED-DED encoder.
//
// Holds the code-length control unit (comparator and address counter), the
// column and row parity-bit generators and the output multiplexers. A page
// starts after CLRB: each enabled cycle one m-bit byte enters on din. The k
// information bytes leave unchanged on dout in cycles 0..k-1, the
// column-parity byte follows in cycle k and the row-parity bytes in cycles
// k+1..n-1; page_end then stays high until the next CLRB. m = Mi + 1 and
// k = Ki are read continuously and must be set before CLRB is released.
// The counter and generators also run while the decoder is enabled, and
// ctl, col and row feed the decoder's syndrome unit: the two share them as
// in the codec block diagram.
module fec_encoder
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              en,         // EN_ENC | EN_DEC
  input  logic [MI_W-1:0]   mi,
  input  logic [KI_W-1:0]   ki,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] enc_dout,
  output logic              ctl_o,      // parity bytes on enc_dout (CTL)
  output logic              page_end,   // END
  // shared with the decoder
  output ctl_t              ctl,
  output logic [DATA_W-1:0] lanes,
  output logic [XP_W-1:0]   xp,
  output logic [DATA_W-1:0] col,
  output logic [ROW_W-1:0]  row
);

  logic       k_valid;
  logic [1:0] parity_sw;
  logic       data_sw;

  assign lanes = lane_mask(mi);

  code_length_comparator u_cmp (
    .ki(ki), .k_valid(k_valid), .xp(xp)
  );

  code_length_counter u_cnt (
    .clk(clk), .clrb(clrb), .en(en), .ki(ki), .k_valid(k_valid),
    .xp(xp), .mi(mi), .ctl(ctl)
  );

  col_parity_gen u_col (
    .clk(clk), .clrb(clrb), .load(ctl.load), .din(din), .lanes(lanes),
    .col(col)
  );

  row_parity_gen u_row (
    .clk(clk), .clrb(clrb), .load(ctl.load), .addr(ctl.addr), .din(din),
    .lanes(lanes), .xp(xp), .row(row)
  );

  enc_output_mux u_mux (
    .phase(ctl.phase), .rofs(ctl.rofs), .din(din), .lanes(lanes),
    .col(col), .row(row), .parity_sw(parity_sw), .data_sw(data_sw),
    .dout(enc_dout)
  );

  assign ctl_o    = |parity_sw;
  assign page_end = (ctl.phase == PH_END);

endmodule
