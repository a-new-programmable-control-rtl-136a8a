// mbl_codec: programmable (n_l, k_l, m_l, m) multi-bit-layer interleaved
// SEC-SoddEC-SBED-DED encoder-decoder, optionally interleaved over l = 1,
// 2 or 4 codes (pages).
//
// Each of the m data-I/O lanes of a byte stream carries its own code (a
// "bit layer"): the k = k_l * m_l bits a lane sees are grouped into k_l
// symbols of m_l consecutive bits, and the lane appends R = m_l +
// 2 ceil(log2 k_l) parity bits, one per extra byte. A burst that hits up
// to m_l consecutive bytes touches one symbol of each lane, so it is
// corrected if it flips an odd number of bits of every lane it touches
// and detected otherwise. With k_l = 63, m_l = m = 8 a 528-byte NAND page
// holds 504 data bytes and 20 parity bytes (the (66, 63, 8, 8) code).
//
// Interleaving (ls = log2 l): the stream holds k*l data bytes and byte j
// belongs to code f = j mod l, so l such codes are interleaved byte by
// byte and a symbol of code f is made of every l-th byte. A burst of up
// to l * m_l consecutive bytes then touches one symbol of each code. The
// l parity groups (R bytes each, code 0 first) follow all the data. With
// l = 4 and the (66, 63, 8, 8) code, 2016 data bytes spread over four
// 528-byte pages and 80 parity bytes follow them in the fourth page.
//
// Interface and timing follow the byte codec: after CLRB one byte per
// enabled cycle; when writing (en_enc) enc_dout passes the data bytes and
// then the parity bytes (ctl_o), and page_end rises after k*l + R*l
// cycles. When reading (en_dec with en_enc) the data bytes are buffered,
// each lane's and code's verdict is registered in the first PH_END cycle,
// and buffer reads on read_addr return corrected bytes one cycle later:
// bit i of byte a is inverted when code f = a mod l of lane i is
// correctable, a lies in its error symbol and the error pattern has a 1
// at a's position in the symbol. m_l (mli), k_l (kli), l (ls) and the
// active lanes (mi) are set at run time; the data must fit the 4096-byte
// buffer. Summary flags: one_err if some lane was corrected and none is
// uncorrectable, two_err if any lane is uncorrectable; lane_sec/lane_unc
// combine a lane's codes. The code, the parity order within a code and the
// interleaving follow the document; the parity group order, the hardware
// organisation (a sequencer, per-lane, per-code generators and checkers
// reusing the byte codec's error-type detector, and the buffer) and the
// decoding are this design's.
module mbl_codec
  import ecc_pkg::*;
#(
  parameter int DEPTH = MAX_K
) (
  input  logic              clk,
  input  logic              clrb,
  input  logic              en_enc,
  input  logic              en_dec,
  input  logic [MI_W-1:0]   mi,          // m - 1: active data-I/O lanes
  input  logic [MI_W-1:0]   mli,         // m_l - 1: symbol size per lane
  input  logic [KI_W-1:0]   kli,         // k_l: symbols per lane and code
  input  logic [LS_W-1:0]   ls,          // log2 l: 0, 1 or 2
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
  output logic [DATA_W-1:0] lane_sec,    // per-lane correctable (some code)
  output logic [DATA_W-1:0] lane_unc,    // per-lane SBED or DED (some code)
  output logic [MAX_L-1:0][DATA_W-1:0] code_sec,               // per code and lane
  output logic [MAX_L-1:0][DATA_W-1:0] code_unc,
  output logic [MAX_L-1:0][DATA_W-1:0][ADDR_W-1:0] err_sym,    // error symbol
  output logic [MAX_L-1:0][DATA_W-1:0][DATA_W-1:0] err_pat     // error bits
);

  phase_t            phase;
  logic [ADDR_W-1:0] addr, sym;
  logic [LS_W-1:0]   f, pf;
  logic [2:0]        h;
  logic [ROFS_W-1:0] t;
  logic [XP_W-1:0]   xp;
  logic              load;
  logic [DATA_W-1:0] lanes, smask;
  logic [MAX_L-1:0][DATA_W-1:0] par, d_no, d_sec, d_sbed, d_ded, ok;
  logic [MAX_L-1:0][DATA_W-1:0][DATA_W-1:0] s_col, d_bit;
  logic [MAX_L-1:0][DATA_W-1:0][ROW_W-1:0]  s_row;
  logic [MAX_L-1:0][DATA_W-1:0][MAX_X-1:0]  d_addr;
  logic [MAX_L-1:0][DATA_W-1:0][ADDR_W-1:0] base;  // first byte of the error symbol
  logic [DATA_W-1:0] buf_dout, fix;
  logic [ADDR_W-1:0] raddr_q, lmask, group;
  logic              en;

  assign en    = en_enc | en_dec;
  assign lanes = lane_mask(mi);
  assign smask = lane_mask(mli);
  assign lmask = ADDR_W'((1 << ls) - 1);
  assign group = ADDR_W'((int'(mli) + 1) << ls);    // bytes per symbol group: m_l * l

  mbl_counter u_cnt (
    .clk(clk), .clrb(clrb), .en(en), .mli(mli), .kli(kli), .ls(ls), .phase(phase),
    .addr(addr), .f(f), .h(h), .sym(sym), .pf(pf), .t(t), .xp(xp), .load(load)
  );

  for (genvar c = 0; c < MAX_L; c++) begin : g_code
    phase_t cph;   // PH_ROWP only while this code's parity group passes
    assign cph = (phase == PH_ROWP && pf == LS_W'(c)) ? PH_ROWP : PH_IDLE;

    for (genvar i = 0; i < DATA_W; i++) begin : g_lane
      mbl_bit_layer u_layer (
        .clk(clk), .clrb(clrb), .dec_en(en_dec), .phase(cph),
        .load(load && lanes[i] && f == LS_W'(c)), .h(h), .sym(sym), .t(t),
        .mli(mli), .xp(xp), .din(din[i]), .par_bit(par[c][i]),
        .s_col(s_col[c][i]), .s_row(s_row[c][i])
      );

      error_type_detector #(.W(DATA_W), .NX(MAX_X), .XW(XP_W)) u_det (
        .s_col(s_col[c][i] & smask), .s_row(s_row[c][i]), .xp(xp),
        .no_err(d_no[c][i]), .sec(d_sec[c][i]), .sbed(d_sbed[c][i]), .ded(d_ded[c][i]),
        .err_addr(d_addr[c][i]), .err_bit(d_bit[c][i])
      );
    end
  end

  // encoder output: data bytes, then one parity bit per lane per byte
  always_comb begin
    unique case (phase)
      PH_DATA: enc_dout = din & lanes;
      PH_ROWP: enc_dout = par[pf] & lanes;
      default: enc_dout = '0;
    endcase
  end
  assign ctl_o    = (phase == PH_ROWP);
  assign page_end = (phase == PH_END);

  // verdict, registered in the first PH_END cycle of a read; codes beyond
  // l are reported clean
  always_ff @(posedge clk) begin
    if (!clrb) begin
      dec_valid <= 1'b0;
      ok        <= '0;
      code_sec  <= '0;
      code_unc  <= '0;
      err_sym   <= '0;
      err_pat   <= '0;
      base      <= '0;
    end else if (en_dec && phase == PH_END && !dec_valid) begin
      dec_valid <= 1'b1;
      for (int c = 0; c < MAX_L; c++) begin
        if (c <= int'(lmask)) begin
          ok[c]       <= d_no[c] | ~lanes;
          code_sec[c] <= d_sec[c] & lanes;
          code_unc[c] <= (d_sbed[c] | d_ded[c]) & lanes;
        end else begin
          ok[c]       <= '1;
          code_sec[c] <= '0;
          code_unc[c] <= '0;
        end
        for (int i = 0; i < DATA_W; i++) begin
          err_sym[c][i] <= d_addr[c][i][ADDR_W-1:0];
          err_pat[c][i] <= d_bit[c][i] & smask;
          base[c][i]    <= ADDR_W'(d_addr[c][i][ADDR_W-1:0] * group) + ADDR_W'(c);
        end
      end
    end
  end

  always_comb begin
    lane_sec = '0;
    lane_unc = '0;
    for (int c = 0; c < MAX_L; c++) begin
      lane_sec = lane_sec | code_sec[c];
      lane_unc = lane_unc | code_unc[c];
    end
  end

  assign two_err = dec_valid && (lane_unc != '0);
  assign one_err = dec_valid && !two_err && (lane_sec != '0);
  assign no_err  = dec_valid && (&ok);

  ram_buffer #(.DEPTH(DEPTH), .W(DATA_W), .AW(ADDR_W)) u_buf (
    .clk(clk), .we(en_dec && load), .waddr(addr), .wdata(din & lanes),
    .raddr(read_addr), .rdata(buf_dout)
  );

  // per-lane correction on the registered read: the byte belongs to code
  // f = a mod l and sits at position (a - base) / l of that code's symbol
  always_ff @(posedge clk) raddr_q <= read_addr;

  always_comb begin
    logic [LS_W-1:0] fc;
    fc = LS_W'(raddr_q & lmask);
    for (int i = 0; i < DATA_W; i++) begin
      logic [ADDR_W-1:0] off, pos;
      off    = raddr_q - base[fc][i];
      pos    = off >> ls;
      fix[i] = code_sec[fc][i] && (raddr_q >= base[fc][i]) && (pos <= ADDR_W'(mli)) &&
               err_pat[fc][i][pos[2:0]];
    end
  end

  assign dec_dout = buf_dout ^ fix;

endmodule
