// ecc_codec_system: top level of the programmable ECC encoder-decoder. It
// holds both codes of the design behind one set of memory-side pins:
//   ilv = 0: the (n, k, m) byte code (fec_codec). k = ki bytes of m = mi+1
//            bits, n = k + 1 + ceil(2X/m); corrects an odd number of bit
//            errors inside one byte and detects an even number in one byte
//            and errors in two or more bytes.
//   ilv = 1: the (n_l, k_l, m_l, m) multi-bit-layer interleaved code
//            (mbl_codec). Each of the m lanes codes k_l = ki symbols of
//            m_l = mli+1 consecutive bits; n = k_l*m_l + m_l + 2X bytes;
//            corrects a burst confined to one symbol of each lane. With
//            ls > 0, l = 2^ls such codes are interleaved byte by byte
//            (over l pages), so the burst may span l * m_l bytes.
// Interface and timing are those of the two codecs, which share them: CLRB
// low for one clock starts a page, then one byte per cycle on din while
// EN_ENC (write: enc_dout carries the codeword, ctl_o marks parity bytes,
// page_end follows the last byte) or EN_DEC together with EN_ENC (read:
// the page is buffered, the verdict is valid from the cycle after the
// last byte, and dec_dout returns corrected data one cycle after
// read_addr). Only the selected codec is enabled; outputs come from it.
// ilv must stay constant during a page. sbed, ded, err_addr and err_bit
// report the byte code; lane_sec, lane_unc, code_sec, code_unc, err_sym and
// err_pat report the interleaved code (per lane, and per code and lane). The two codes follow the document; putting them side
// by side behind a select pin, each with its own page buffer, is this
// design's choice.
module ecc_codec_system
  import ecc_pkg::*;
#(
  parameter int DEPTH = MAX_K
) (
  input  logic              clk,
  input  logic              clrb,        // page reset, active low
  input  logic              ilv,         // 0: byte code, 1: interleaved code
  input  logic              en_enc,
  input  logic              en_dec,
  input  logic [MI_W-1:0]   mi,          // m - 1
  input  logic [MI_W-1:0]   mli,         // m_l - 1 (interleaved code)
  input  logic [LS_W-1:0]   ls,          // log2 of the interleave depth l
  input  logic [KI_W-1:0]   ki,          // k bytes, or k_l symbols per lane
  input  logic [DATA_W-1:0] din,
  input  logic [ADDR_W-1:0] read_addr,
  output logic [DATA_W-1:0] enc_dout,
  output logic [DATA_W-1:0] dec_dout,
  output logic              ctl_o,
  output logic              page_end,
  output logic              dec_valid,
  output logic              no_err,
  output logic              one_err,
  output logic              two_err,
  output logic              sbed,
  output logic              ded,
  output logic [ADDR_W-1:0] err_addr,
  output logic [DATA_W-1:0] err_bit,
  output logic [DATA_W-1:0] lane_sec,
  output logic [DATA_W-1:0] lane_unc,
  output logic [MAX_L-1:0][DATA_W-1:0] code_sec,
  output logic [MAX_L-1:0][DATA_W-1:0] code_unc,
  output logic [MAX_L-1:0][DATA_W-1:0][ADDR_W-1:0] err_sym,
  output logic [MAX_L-1:0][DATA_W-1:0][DATA_W-1:0] err_pat
);

  logic [DATA_W-1:0] b_enc, b_dec, i_enc, i_dec;
  logic b_ctl, b_end, b_valid, b_no, b_one, b_two;
  logic i_ctl, i_end, i_valid, i_no, i_one, i_two;

  fec_codec #(.DEPTH(DEPTH)) u_byte (
    .clk(clk), .clrb(clrb), .en_enc(en_enc && !ilv), .en_dec(en_dec && !ilv),
    .mi(mi), .ki(ki), .din(din), .read_addr(read_addr),
    .enc_dout(b_enc), .dec_dout(b_dec), .ctl_o(b_ctl), .page_end(b_end),
    .dec_valid(b_valid), .one_err(b_one), .two_err(b_two), .no_err(b_no),
    .sbed(sbed), .ded(ded), .err_addr(err_addr), .err_bit(err_bit)
  );

  mbl_codec #(.DEPTH(DEPTH)) u_ilv (
    .clk(clk), .clrb(clrb), .en_enc(en_enc && ilv), .en_dec(en_dec && ilv),
    .mi(mi), .mli(mli), .kli(ki), .ls(ls), .din(din), .read_addr(read_addr),
    .enc_dout(i_enc), .dec_dout(i_dec), .ctl_o(i_ctl), .page_end(i_end),
    .dec_valid(i_valid), .no_err(i_no), .one_err(i_one), .two_err(i_two),
    .lane_sec(lane_sec), .lane_unc(lane_unc),
    .code_sec(code_sec), .code_unc(code_unc), .err_sym(err_sym), .err_pat(err_pat)
  );

  assign enc_dout  = ilv ? i_enc   : b_enc;
  assign dec_dout  = ilv ? i_dec   : b_dec;
  assign ctl_o     = ilv ? i_ctl   : b_ctl;
  assign page_end  = ilv ? i_end   : b_end;
  assign dec_valid = ilv ? i_valid : b_valid;
  assign no_err    = ilv ? i_no    : b_no;
  assign one_err   = ilv ? i_one   : b_one;
  assign two_err   = ilv ? i_two   : b_two;

endmodule
