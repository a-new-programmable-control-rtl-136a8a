// ecc_pkg: widths, types and helper functions shared by the programmable
// (n, k, m) SEC-SoddEC-SBED-DED codec.
//
// The codec works on a page of k bytes, each m bits wide (m = 1..8, k =
// 2..4096). It appends one column-parity byte (m bits, one per bit lane) and
// ceil(2X/m) row-parity bytes, where X = ceil(log2 k) is the number of row
// parity pairs (R'_x, R_x). The widths below are the limits of that range:
// 8-bit data, a 13-bit length setting Ki, a 12-bit byte address and 12 row
// parity pairs (24 row parity bits).
//
// Row-parity bit layout (this design's choice, following the even/odd
// pairing of the syndrome equations): bit 2(x-1) holds R'_x (parity of the
// bytes whose address bit x-1 is 0) and bit 2(x-1)+1 holds R_x (address bit
// x-1 is 1). The row-parity bytes carry this 24-bit vector least significant
// bits first, m bits per byte.
package ecc_pkg;

  localparam int DATA_W = 8;          // widest data-I/O (m <= 8)
  localparam int MI_W   = 3;          // Mi: m - 1
  localparam int KI_W   = 13;         // Ki: k in bytes, 2..4096
  localparam int ADDR_W = 12;         // byte address inside a page
  localparam int MAX_X  = 12;         // ceil(log2 4096)
  localparam int ROW_W  = 2 * MAX_X;  // 24 row parity bits
  localparam int XP_W   = 4;          // width of X (0..12)
  localparam int ROFS_W = 5;          // offset into the row vector (0..31)
  localparam int MAX_K  = 4096;
  localparam int MAX_L  = 4;          // interleave depth of the multi-bit-layer code (pages)
  localparam int LS_W   = 2;          // log2 of that depth: 0, 1 or 2

  // Phase of a page transfer, as sequenced by the code-length address counter.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,  // Ki out of range: nothing is coded
    PH_DATA = 3'd1,  // k information bytes pass (cycles 0..k-1)
    PH_COLP = 3'd2,  // column-parity byte (cycle k)
    PH_ROWP = 3'd3,  // row-parity bytes (cycles k+1..n-1)
    PH_END  = 3'd4   // page finished: END is high
  } phase_t;

  // Control bundle from the code-length control unit to the datapath.
  typedef struct packed {
    phase_t              phase;
    logic [ADDR_W-1:0]   addr;   // byte address j during PH_DATA
    logic [ROFS_W-1:0]   rofs;   // first row-parity bit carried by this byte
    logic                load;   // accumulate this byte into the generators
    logic                step;   // the counter advances this cycle
  } ctl_t;

  // Mask of the m active data-I/O lanes, m = mi + 1.
  function automatic logic [DATA_W-1:0] lane_mask(input logic [MI_W-1:0] mi);
    lane_mask = '0;
    for (int i = 0; i < DATA_W; i++)
      if (i <= int'(mi)) lane_mask[i] = 1'b1;
  endfunction

  // Mask of the 2X used row-parity bits.
  function automatic logic [ROW_W-1:0] row_mask(input logic [XP_W-1:0] xp);
    row_mask = '0;
    for (int i = 0; i < ROW_W; i++)
      if (i < 2 * int'(xp)) row_mask[i] = 1'b1;
  endfunction

endpackage
