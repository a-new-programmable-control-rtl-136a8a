// code_length_comparator: decodes the page-length setting Ki into the number
// of row-parity pairs X = ceil(log2 k) and a range flag.
//
// Ki is the information length k in bytes. Values 2..4096 (0x002..0x1000) are
// valid; 0, 1 and anything above 4096 are unused and leave the codec idle.
// X is found by comparing k against the powers of two 1, 2, 4, ..., 2048:
// each threshold that k exceeds adds one pair, so X counts the thresholds
// below k. The valid Ki range and the job of choosing the number of parity
// bytes come from the codec description; building it as a bank of constant
// comparators is this design's choice. Purely combinational.
module code_length_comparator
  import ecc_pkg::*;
(
  input  logic [KI_W-1:0] ki,       // information length k in bytes
  output logic            k_valid,  // 2 <= k <= 4096
  output logic [XP_W-1:0] xp        // X = ceil(log2 k), 1..12 when valid
);

  always_comb begin
    xp = '0;
    for (int x = 0; x < MAX_X; x++)
      if (ki > KI_W'(1 << x)) xp = xp + XP_W'(1);
    k_valid = (ki >= KI_W'(2)) && (ki <= KI_W'(MAX_K));
  end

endmodule
