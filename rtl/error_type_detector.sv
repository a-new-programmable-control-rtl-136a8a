// error_type_detector: classifies a page from its syndromes.
//
// Inputs are the column syndrome (one bit per data lane) and the row
// syndrome pairs (S'_row(x) at bit 2(x-1), S_row(x) at bit 2(x-1)+1) for the
// X pairs in use. The decision follows the code's four cases, in order:
//  no_err : every syndrome bit is 0, or exactly one is 1 (a single error in
//           the parity bytes; the information bytes are taken as correct).
//  sec    : the column syndrome has odd weight and every used pair has
//           exactly one bit set. An odd number of bits failed in one byte;
//           the byte address is read from the S_row bits and the failing
//           bits are the column syndrome (SEC-SoddEC, "one_err").
//  sbed   : otherwise, a non-zero column syndrome of even weight with all
//           row syndromes 0: an even number of bits failed inside one byte.
//  ded    : any other non-zero syndrome, two or more errors.
// sbed and ded are uncorrectable. err_addr and err_bit are driven from the
// syndromes whatever the case. Purely combinational.
// NX and W are parameters so that the same detector serves the bit-layer
// lanes of the interleaved codec; the defaults are the byte codec's.
module error_type_detector #(
  parameter int W  = 8,    // column syndrome width (m or ml)
  parameter int NX = 12,   // row syndrome pairs available
  parameter int XW = 4     // width of xp
) (
  input  logic [W-1:0]    s_col,
  input  logic [2*NX-1:0] s_row,
  input  logic [XW-1:0]   xp,       // X, pairs in use
  output logic            no_err,
  output logic            sec,
  output logic            sbed,
  output logic            ded,
  output logic [NX-1:0]   err_addr,
  output logic [W-1:0]    err_bit
);

  int   weight;
  logic pairs_one;

  always_comb begin
    weight = $countones(s_col) + $countones(s_row);
    pairs_one = 1'b1;
    for (int x = 0; x < NX; x++) begin
      err_addr[x] = s_row[2*x+1];
      if (x < int'(xp) && !(s_row[2*x] ^ s_row[2*x+1])) pairs_one = 1'b0;
    end
    err_bit = s_col;
    no_err  = (weight <= 1);
    sec     = !no_err && (^s_col) && pairs_one;
    sbed    = !no_err && !sec && (s_col != '0) && !(^s_col) && (s_row == '0);
    ded     = !no_err && !sec && !sbed;
  end

endmodule
