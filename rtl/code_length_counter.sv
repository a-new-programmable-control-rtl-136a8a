// code_length_counter: the code-length address counter that sequences one
// page through the codec.
//
// After CLRB (active-low, synchronous to CLK here) the counter starts at byte
// address 0. Each enabled cycle it takes one byte: k information bytes
// (PH_DATA, address j = 0..k-1, load high), then the column-parity byte
// (PH_COLP), then the row-parity bytes (PH_ROWP). During PH_ROWP, rofs is the
// index of the first row-parity bit carried by the current byte; it grows by
// m per byte, and the last row byte is the one after which rofs + m >= 2X.
// The counter then stops in PH_END (the END pin) until the next CLRB. So a
// page takes n = k + 1 + ceil(2X/m) enabled cycles, as in the codec's timing
// flow (data, column parity at cycle k, row parity up to cycle n-1, END).
// Ki out of range holds the counter in PH_IDLE. The stop test on rofs
// avoids a divider; that, and holding state while disabled, are this
// design's choices.
module code_length_counter
  import ecc_pkg::*;
(
  input  logic            clk,
  input  logic            clrb,     // page reset, active low
  input  logic            en,       // EN_ENC or EN_DEC
  input  logic [KI_W-1:0] ki,       // k in bytes
  input  logic            k_valid,
  input  logic [XP_W-1:0] xp,       // X
  input  logic [MI_W-1:0] mi,       // m - 1
  output ctl_t            ctl
);

  phase_t            phase_q;
  logic [KI_W-1:0]   j_q;
  logic [ROFS_W-1:0] rofs_q;
  logic [ROFS_W-1:0] m_w;
  logic [ROFS_W:0]   rnext;

  assign m_w   = ROFS_W'(mi) + ROFS_W'(1);
  assign rnext = {1'b0, rofs_q} + {1'b0, m_w};

  always_ff @(posedge clk) begin
    if (!clrb) begin
      phase_q <= k_valid ? PH_DATA : PH_IDLE;
      j_q     <= '0;
      rofs_q  <= '0;
    end else if (en) begin
      unique case (phase_q)
        PH_DATA: begin
          j_q <= j_q + KI_W'(1);
          if (j_q == ki - KI_W'(1)) phase_q <= PH_COLP;
        end
        PH_COLP: begin
          phase_q <= PH_ROWP;
          rofs_q  <= '0;
        end
        PH_ROWP: begin
          if (rnext >= (ROFS_W + 1)'(2 * int'(xp))) phase_q <= PH_END;
          else rofs_q <= rnext[ROFS_W-1:0];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    ctl.phase = phase_q;
    ctl.addr  = j_q[ADDR_W-1:0];
    ctl.rofs  = rofs_q;
    ctl.step  = en;
    ctl.load  = en && (phase_q == PH_DATA);
  end

endmodule
