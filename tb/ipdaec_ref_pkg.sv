// ipdaec_ref_pkg: reference model used by the IP-DAEC testbenches.
//
// Written apart from the RTL: the (28,22) H matrix is held row by row in
// column order 1..28 (p1..p6, then the 22 protected data bits), and the word
// layout is spelled out cell by cell with 1-based data numbering d1..d32.
package ipdaec_ref_pkg;

  // Row r, column c (1-based) is HROW[r-1][28-c].
  localparam logic [27:0] HROW [6] = '{
    28'b1000000011110100011101010101,
    28'b0100000101011001100000111110,
    28'b0010001010100011010110110001,
    28'b0001000100010110011110100111,
    28'b0000101010001101011111001110,
    28'b0000011101101010111011010001
  };

  function automatic bit hcol(input int r1, input int c1);  // 1-based
    return HROW[r1-1][28-c1];
  endfunction

  // 1-based data bit d_k.
  function automatic bit d(input logic [31:0] w, input int k);
    return w[k-1];
  endfunction

  // 1-based number of the data bit in SEC-DAEC position q (1..22):
  // d1, d2, d4, d5, ..., d28, d29, d31, d32.
  function automatic int uq(input int q);
    int cl = (q - 1) / 2;
    return 3 * cl + 1 + ((q - 1) % 2);
  endfunction

  function automatic logic [5:0] ref_sd_parity(input logic [31:0] w);
    logic [5:0] p = '0;
    for (int r = 1; r <= 6; r++)
      for (int q = 1; q <= 22; q++)
        if (hcol(r, 6 + q)) p[r-1] ^= d(w, uq(q));
    return p;
  endfunction

  function automatic bit ref_ip(input logic [31:0] w);
    bit p = 0;
    for (int k = 3; k <= 30; k += 3) p ^= d(w, k);
    return p;
  endfunction

  // 39-bit stored word: cell c occupies bits 3c+2..3c (bit 3c = lowest).
  function automatic logic [38:0] ref_encode(input logic [31:0] w);
    logic [38:0] cw;
    logic [5:0]  p = ref_sd_parity(w);
    for (int c = 0; c < 10; c++) begin
      cw[3*c]   = d(w, 3*c + 1);
      cw[3*c+1] = d(w, 3*c + 2);
      cw[3*c+2] = d(w, 3*c + 3);
    end
    cw[30] = d(w, 31);
    cw[31] = d(w, 32);
    cw[32] = ref_ip(w);
    cw[35:33] = {p[2], p[1], p[0]};   // cell 11: p3 p2 p1
    cw[38:36] = {p[5], p[4], p[3]};   // cell 12: p6 p5 p4
    return cw;
  endfunction

  // Cell c of a stored word moved by delta levels (saturating).
  function automatic logic [38:0] ref_shift(input logic [38:0] cw, input int c, input int delta);
    int lvl = int'(cw[3*c +: 3]) + delta;
    if (lvl < 0) lvl = 0;
    if (lvl > 7) lvl = 7;
    cw[3*c +: 3] = 3'(lvl);
    return cw;
  endfunction

  // Data bits as stored in a (possibly corrupted) word, without correction.
  function automatic logic [31:0] ref_raw_data(input logic [38:0] cw);
    return cw[31:0];
  endfunction

endpackage
