// mbl_counter: sequencer of the (n_l, k_l, m_l, m) multi-bit-layer codec,
// including its interleaving over l = 1, 2 or 4 codes.
//
// With l codes, the stream holds k*l data bytes (k = k_l * m_l per code)
// followed by l groups of R = m_l + 2X parity bytes, X = ceil(log2 k_l).
// Data byte j belongs to code f = j mod l; inside that code it sits at
// position h = (j / l) mod m_l of symbol s = j / (m_l * l). These are kept
// as three counters (f wraps at l-1, then h steps; h wraps at m_l-1, then
// s steps) so that no divider is needed. In the parity phase, pf is the
// code whose parity group is being sent (codes in order 0..l-1) and
// t = 0..R-1 numbers its parity bytes. PH_END follows after k*l + R*l
// enabled cycles and holds until CLRB. A k_l outside 2..4096, a data
// stream above 4096 bytes or ls = 3 holds the counter in PH_IDLE.
// With l = 1 this is the single-page code. The symbol and interleave
// formulas follow the document; the counter structure is this design's.
module mbl_counter
  import ecc_pkg::*;
(
  input  logic              clk,
  input  logic              clrb,
  input  logic              en,
  input  logic [MI_W-1:0]   mli,     // m_l - 1
  input  logic [KI_W-1:0]   kli,     // k_l, symbols per lane and code
  input  logic [LS_W-1:0]   ls,      // log2 l
  output phase_t            phase,
  output logic [ADDR_W-1:0] addr,    // byte address j
  output logic [LS_W-1:0]   f,       // code of data byte j
  output logic [2:0]        h,       // position inside the symbol
  output logic [ADDR_W-1:0] sym,     // symbol index
  output logic [LS_W-1:0]   pf,      // code of the parity group
  output logic [ROFS_W-1:0] t,       // parity byte index inside the group
  output logic [XP_W-1:0]   xp,      // X
  output logic              load
);

  logic              kl_valid;
  logic [ROFS_W-1:0] rlen;           // m_l + 2X
  logic [LS_W-1:0]   lmax;           // l - 1
  logic [17:0]       kbytes;

  code_length_comparator u_cmp (.ki(kli), .k_valid(kl_valid), .xp(xp));

  assign lmax   = LS_W'((1 << ls) - 1);
  assign kbytes = (18'(kli) * (18'(mli) + 18'd1)) << ls;
  assign rlen   = ROFS_W'(mli) + ROFS_W'(1) + ROFS_W'(2 * int'(xp));

  always_ff @(posedge clk) begin
    if (!clrb) begin
      phase <= (kl_valid && kbytes <= 18'(MAX_K) && int'(ls) < 3) ? PH_DATA : PH_IDLE;
      addr  <= '0;
      f     <= '0;
      h     <= '0;
      sym   <= '0;
      pf    <= '0;
      t     <= '0;
    end else if (en) begin
      unique case (phase)
        PH_DATA: begin
          addr <= addr + ADDR_W'(1);
          if (f == lmax) begin
            f <= '0;
            if (h == mli) begin
              h   <= '0;
              sym <= sym + ADDR_W'(1);
              if (sym == ADDR_W'(kli - KI_W'(1))) phase <= PH_ROWP;
            end else begin
              h <= h + 3'd1;
            end
          end else begin
            f <= f + LS_W'(1);
          end
        end
        PH_ROWP: begin
          if (t == rlen - ROFS_W'(1)) begin
            t <= '0;
            pf <= pf + LS_W'(1);
            if (pf == lmax) phase <= PH_END;
          end else begin
            t <= t + ROFS_W'(1);
          end
        end
        default: ;
      endcase
    end
  end

  assign load = en && (phase == PH_DATA);

endmodule
