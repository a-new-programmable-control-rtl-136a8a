// data_corrector: address comparator and data corrector on the buffer's
// read path.
//
// The read address is registered alongside the buffer's registered read so
// that the comparison lines up with the byte it selects. When the page was
// classified as correctable (sec) and the address equals the error
// address, the error bits are inverted in the byte read out; any other byte
// passes unchanged. Correction therefore happens on the fly, for any
// address, one cycle after it is presented.
module data_corrector #(
  parameter int W  = 8,
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,     // address presented to the buffer
  input  logic [W-1:0]  rdata,     // buffer output (one cycle later)
  input  logic          sec,       // page holds a correctable error
  input  logic [AW-1:0] err_addr,
  input  logic [W-1:0]  err_bit,
  output logic [W-1:0]  dout
);

  logic [AW-1:0] raddr_q;

  always_ff @(posedge clk) raddr_q <= raddr;

  assign dout = rdata ^ ((sec && raddr_q == err_addr) ? err_bit : '0);

endmodule
