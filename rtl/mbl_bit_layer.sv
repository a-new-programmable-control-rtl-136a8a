// mbl_bit_layer: one data-I/O lane ("bit layer") of the multi-bit-layer
// interleaved code: a complete SEC-SoddEC-SBED-DED code over the bit
// stream of that lane, with m_l consecutive bits forming one symbol.
//
// Encoding: for data bit b at byte j (symbol s, position h), C_h ^= b, and
// for each pair x <= X, R_x ^= b if bit x-1 of s is 1, else R'_x ^= b.
// Parity bits leave one per parity byte t in the order of the lane's
// parity column: C_0..C_{m_l-1}, then R'_1, R_1, R'_2, R_2, ... (the
// layout printed for the (7, 4, 2, 4) example). Decoding: the same
// generators rebuild the parity from the received data, and each stored
// parity bit t is XORed with the rebuilt one into the column or row
// syndrome. Everything is cleared by CLRB.
module mbl_bit_layer
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              dec_en,   // capture syndromes
  input  phase_t            phase,
  input  logic              load,
  input  logic [2:0]        h,
  input  logic [ADDR_W-1:0] sym,
  input  logic [ROFS_W-1:0] t,
  input  logic [MI_W-1:0]   mli,
  input  logic [XP_W-1:0]   xp,
  input  logic              din,      // this lane's bit of the byte
  output logic              par_bit,  // parity bit t of this lane
  output logic [DATA_W-1:0] s_col,
  output logic [ROW_W-1:0]  s_row
);

  logic [DATA_W-1:0] col;
  logic [ROW_W-1:0]  row;
  logic [ROFS_W-1:0] ml;
  logic              is_col;
  logic [ROFS_W-1:0] ridx;

  assign ml     = ROFS_W'(mli) + ROFS_W'(1);
  assign is_col = (t < ml);
  assign ridx   = t - ml;

  always_ff @(posedge clk) begin
    if (!clrb) begin
      col <= '0;
      row <= '0;
    end else if (load) begin
      col[h] <= col[h] ^ din;
      for (int x = 0; x < MAX_X; x++)
        if (x < int'(xp)) begin
          if (sym[x]) row[2*x+1] <= row[2*x+1] ^ din;
          else        row[2*x]   <= row[2*x]   ^ din;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (!clrb) begin
      s_col <= '0;
      s_row <= '0;
    end else if (dec_en && phase == PH_ROWP) begin
      if (is_col) s_col[t[2:0]] <= din ^ col[t[2:0]];
      else        s_row[ridx]   <= din ^ row[ridx];
    end
  end

  assign par_bit = (phase == PH_ROWP) ? (is_col ? col[t[2:0]] : row[ridx]) : 1'b0;

endmodule
