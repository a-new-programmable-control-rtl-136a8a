// fec_decoder: programmable (n, k, m) SEC-SoddEC-SBED-DED decoder.
//
// While EN_DEC is high, a page read from memory streams in on din, one byte
// per cycle, in step with the encoder's counter (ctl). Information bytes
// (cycles 0..k-1) are written into the page buffer at their address and
// also feed the encoder's generators; the stored column-parity byte
// (cycle k) and row-parity bytes (k+1..n-1) go to the syndrome unit. In the
// first PH_END cycle (cycle n) the error-type detector's verdict is
// registered, so no_err / one_err / two_err (sbed | ded), err_addr and
// err_bit are valid from cycle n+1 and held until CLRB. From then on any
// buffer address can be read on read_addr; dec_dout returns the byte one
// cycle later, with the error bits inverted if it is the error address.
module fec_decoder
  import ecc_pkg::*;
#(
  parameter int DEPTH = MAX_K
) (
  input  logic              clk,
  input  logic              clrb,
  input  logic              en,          // EN_DEC
  input  ctl_t              ctl,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,
  input  logic [XP_W-1:0]   xp,
  input  logic [DATA_W-1:0] col,
  input  logic [ROW_W-1:0]  row,
  input  logic [ADDR_W-1:0] read_addr,
  output logic [DATA_W-1:0] dec_dout,
  output logic              no_err,
  output logic              one_err,
  output logic              two_err,
  output logic              sbed,
  output logic              ded,
  output logic              valid,       // verdict registered
  output logic [ADDR_W-1:0] err_addr,
  output logic [DATA_W-1:0] err_bit
);

  logic [DATA_W-1:0] s_col;
  logic [ROW_W-1:0]  s_row;
  logic              d_no, d_sec, d_sbed, d_ded;
  logic [MAX_X-1:0]  d_addr;
  logic [DATA_W-1:0] d_bit;
  logic [DATA_W-1:0] buf_dout;

  syndrome_generator u_syn (
    .clk(clk), .clrb(clrb), .en(en), .ctl(ctl), .din(din), .lanes(lanes),
    .xp(xp), .col(col), .row(row), .s_col(s_col), .s_row(s_row)
  );

  error_type_detector #(.W(DATA_W), .NX(MAX_X), .XW(XP_W)) u_det (
    .s_col(s_col), .s_row(s_row), .xp(xp), .no_err(d_no), .sec(d_sec),
    .sbed(d_sbed), .ded(d_ded), .err_addr(d_addr), .err_bit(d_bit)
  );

  always_ff @(posedge clk) begin
    if (!clrb) begin
      valid    <= 1'b0;
      no_err   <= 1'b0;
      one_err  <= 1'b0;
      sbed     <= 1'b0;
      ded      <= 1'b0;
      err_addr <= '0;
      err_bit  <= '0;
    end else if (en && ctl.phase == PH_END && !valid) begin
      valid    <= 1'b1;
      no_err   <= d_no;
      one_err  <= d_sec;
      sbed     <= d_sbed;
      ded      <= d_ded;
      err_addr <= d_addr[ADDR_W-1:0];
      err_bit  <= d_bit;
    end
  end

  assign two_err = sbed | ded;

  ram_buffer #(.DEPTH(DEPTH), .W(DATA_W), .AW(ADDR_W)) u_buf (
    .clk(clk), .we(en && ctl.load), .waddr(ctl.addr), .wdata(din & lanes),
    .raddr(read_addr), .rdata(buf_dout)
  );

  data_corrector #(.W(DATA_W), .AW(ADDR_W)) u_cor (
    .clk(clk), .raddr(read_addr), .rdata(buf_dout), .sec(one_err),
    .err_addr(err_addr), .err_bit(err_bit), .dout(dec_dout)
  );

endmodule
