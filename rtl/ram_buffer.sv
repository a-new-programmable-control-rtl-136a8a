// ram_buffer: the decoder's k-byte page buffer (memory array body).
//
// A simple dual-port memory of DEPTH words of W bits: one write port, used
// while the information bytes of a page stream in, and one read port for
// the system's random-access reads after decoding. The read is registered
// (data appears the cycle after the address), as a synchronous SRAM would
// give it. The depth is the largest page, 4096 bytes; the document sizes
// the buffer by k but does not give its ports or timing.
module ram_buffer #(
  parameter int DEPTH = 4096,
  parameter int W     = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
