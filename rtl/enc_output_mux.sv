// enc_output_mux: the encoder's output multiplexers (mux4 then mux2).
//
// While information bytes pass (data_sw), the input byte goes straight to the
// encoding output. During the parity bytes, the first parity multiplexer
// picks the column-parity byte (cycle k) or a slice of the row-parity vector
// (cycles k+1..n-1): the slice starts at bit rofs and is m bits wide, so the
// 24-bit row vector leaves least significant bits first, m bits per byte.
// Lanes above m and cycles outside a page read as 0. Purely combinational,
// so byte t of the codeword appears in cycle t. The two-level selection
// follows the encoder block diagram; the slicing of the row vector into
// m-bit bytes is this design's choice.
module enc_output_mux
  import ecc_pkg::*;
(
  input  phase_t            phase,
  input  logic [ROFS_W-1:0] rofs,
  input  logic [DATA_W-1:0] din,
  input  logic [DATA_W-1:0] lanes,
  input  logic [DATA_W-1:0] col,
  input  logic [ROW_W-1:0]  row,
  output logic [1:0]        parity_sw,  // {row byte, column byte}
  output logic              data_sw,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] par_byte;
  logic [DATA_W-1:0] row_sh;

  always_comb begin
    data_sw   = (phase == PH_DATA);
    parity_sw = {phase == PH_ROWP, phase == PH_COLP};
    row_sh    = DATA_W'(row >> rofs);
    unique case (parity_sw)
      2'b01:   par_byte = col;
      2'b10:   par_byte = row_sh;
      default: par_byte = '0;
    endcase
    dout = (data_sw ? din : par_byte) & lanes;
  end

endmodule
