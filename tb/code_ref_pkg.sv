// code_ref_pkg -- reference model of the (24,14) burst-5 code for the
// testbenches, built independently of the shift-register circuits.
//
// The code is described here by its 10 x 24 parity check matrix in
// systematic form H = [I | P]: column c of H is X^c mod g(X), so a word v is
// a code word exactly when every row of H has an even number of ones in
// common with v. Encoding solves H v = 0 for the ten parity bits directly,
// without any polynomial division. Bit c of a vector is the coefficient of X^c.
package code_ref_pkg;

  localparam int unsigned REF_N = 24;
  localparam int unsigned REF_K = 14;
  localparam int unsigned REF_P = 10;

  // Rows 0..9 of H; bit c is column c.
  localparam logic [REF_N-1:0] H_ROWS [REF_P] = '{
    24'he1f401, 24'hc3e802, 24'h87d004, 24'hee5408, 24'h3d5c10,
    24'h9b4c20, 24'h369840, 24'h8cc480, 24'hf87d00, 24'hf0fa00
  };

  function automatic logic [REF_P-1:0] h_syndrome(input logic [REF_N-1:0] v);
    logic [REF_P-1:0] s;
    for (int r = 0; r < REF_P; r++) s[r] = ^(H_ROWS[r] & v);
    return s;
  endfunction

  // Systematic code word: message in X^10..X^23, parity in X^0..X^9.
  function automatic logic [REF_N-1:0] h_encode(input logic [REF_K-1:0] m);
    logic [REF_N-1:0] v;
    v = {m, {REF_P{1'b0}}};
    for (int r = 0; r < REF_P; r++) v[r] = ^(H_ROWS[r] & {m, {REF_P{1'b0}}});
    return v;
  endfunction

  // A burst of length len (1..5) whose first and last bits are one; mid
  // fills the bits in between. Placed with its lowest bit at X^pos.
  function automatic logic [REF_N-1:0] burst(input int len, input int mid, input int pos);
    logic [REF_N-1:0] e;
    logic [4:0]       pat;
    pat = 5'b1 | 5'(mid << 1) | 5'(1 << (len - 1));
    e = REF_N'(pat) << pos;
    return e;
  endfunction

endpackage
