// walsh_ref_pkg: independent reference for sequency-ordered Walsh functions.
//
// Builds the 256 x 256 Sylvester-Hadamard matrix in natural order,
// H[a][t] = parity(a & t) (0 = +1, 1 = -1), counts the sign changes along each
// row and files the row under that count. Walsh function i in sequency order is
// the row with exactly i sign changes, starting at +1. This uses neither Gray
// codes nor bit reversal, so it checks the generator's construction rather than
// repeating it. Call build() once before wal().
package walsh_ref_pkg;
  localparam int unsigned NPTS = 256;

  bit [NPTS-1:0] seq_rows [NPTS];
  bit            built = 1'b0;

  function automatic void build();
    for (int a = 0; a < NPTS; a++) begin
      bit [NPTS-1:0] row;
      int            changes;
      for (int t = 0; t < NPTS; t++) row[t] = ^(8'(a) & 8'(t));
      changes = 0;
      for (int t = 1; t < NPTS; t++) if (row[t] != row[t-1]) changes++;
      seq_rows[changes] = row;
    end
    built = 1'b1;
  endfunction

  function automatic bit wal(int unsigned i, int unsigned t);
    return seq_rows[i % NPTS][t % NPTS];
  endfunction
endpackage
