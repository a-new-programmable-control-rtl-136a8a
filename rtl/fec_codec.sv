// fec_codec: programmable (n, k, m) SEC-SoddEC-SBED-DED encoder-decoder.
//
// The code treats a page of k bytes, each m bits wide, as a k x m bit array.
// One column-parity byte holds the parity of each bit lane; X = ceil(log2 k)
// pairs of row-parity bits (R'_x, R_x) hold the parity of all bits in the
// bytes whose address bit x-1 is 0 or 1. Together they correct a single
// bit, or any odd number of bits inside one byte, and detect an even-bit
// error inside one byte and random double errors, for any k = 2..4096 and
// m = 1..8 chosen at run time (Ki, Mi = m - 1).
//
// Writing a page (EN_ENC): after CLRB, one byte per cycle enters on din;
// enc_dout carries the k bytes and then 1 + ceil(2X/m) parity bytes (ctl
// high), n cycles in all; page_end (END) follows.
// Reading a page (EN_DEC, with EN_ENC): the n stored bytes enter on din;
// the information bytes are buffered, and from cycle n+1 the verdict
// (no_err, one_err, two_err) and err_addr / err_bit hold. Bytes read
// from the buffer on read_addr come back on dec_dout one cycle later,
// corrected. Pin names follow the codec's pin list, with the page buffer
// kept inside the decoder as in its block diagram (so the buffer pins of
// the list are internal) and a 12-bit read address.
module fec_codec
  import ecc_pkg::*;
#(
  parameter int DEPTH = MAX_K    // page buffer size in bytes
) (
  input  logic              clk,
  input  logic              clrb,       // active-low page reset
  input  logic              en_enc,
  input  logic              en_dec,
  input  logic [MI_W-1:0]   mi,         // data width m - 1
  input  logic [KI_W-1:0]   ki,         // information length k in bytes
  input  logic [DATA_W-1:0] din,
  input  logic [ADDR_W-1:0] read_addr,
  output logic [DATA_W-1:0] enc_dout,
  output logic [DATA_W-1:0] dec_dout,
  output logic              ctl_o,      // parity bytes on enc_dout
  output logic              page_end,   // END
  output logic              dec_valid,  // verdict valid
  output logic              one_err,    // SEC-SoddEC: corrected on read
  output logic              two_err,    // SBED or DED: uncorrectable
  output logic              no_err,
  output logic              sbed,
  output logic              ded,
  output logic [ADDR_W-1:0] err_addr,
  output logic [DATA_W-1:0] err_bit
);

  ctl_t              ctl;
  logic [DATA_W-1:0] lanes;
  logic [XP_W-1:0]   xp;
  logic [DATA_W-1:0] col;
  logic [ROW_W-1:0]  row;

  fec_encoder u_enc (
    .clk(clk), .clrb(clrb), .en(en_enc | en_dec), .mi(mi), .ki(ki),
    .din(din), .enc_dout(enc_dout), .ctl_o(ctl_o), .page_end(page_end),
    .ctl(ctl), .lanes(lanes), .xp(xp), .col(col), .row(row)
  );

  fec_decoder #(.DEPTH(DEPTH)) u_dec (
    .clk(clk), .clrb(clrb), .en(en_dec), .ctl(ctl), .din(din),
    .lanes(lanes), .xp(xp), .col(col), .row(row), .read_addr(read_addr),
    .dec_dout(dec_dout), .no_err(no_err), .one_err(one_err),
    .two_err(two_err), .sbed(sbed), .ded(ded), .valid(dec_valid),
    .err_addr(err_addr), .err_bit(err_bit)
  );

endmodule
