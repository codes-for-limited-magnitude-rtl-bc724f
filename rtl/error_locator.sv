// error_locator: finds the faulty MLC cell from the SEC-DAEC syndrome.
//
// A limited magnitude error of up to 3 levels hits the lowest bit, the second
// lowest bit, or both, of one cell. The locator compares the syndrome s with
// the three syndromes each data cell c can produce: column 2c (lowest bit),
// column 2c+1 (second lowest bit) and their XOR (both). All comparisons run in
// parallel; hit[c] marks the located cell and pat[c] = {second, lowest} is
// the error pattern on its two low bits. Only in-cell double adjacent errors
// are considered, as the document prescribes, not those straddling two cells.
//
// An error confined to one SEC-DAEC parity cell gives a non-zero syndrome
// whose ones all lie inside that cell's parity bits (H = [I | P]); par_err
// flags it. The code guarantees such syndromes never equal a data-cell
// syndrome. unmatched flags a non-zero syndrome that fits neither case (more
// than one faulty cell); that flag is this design's addition.
//
// Interface: s (SD_R bits) in; hit, pat, par_err, unmatched out.
// Purely combinational.
module error_locator
  import ipdaec_pkg::*;
#(
  parameter int unsigned NC = N_DCELLS,   // data cells
  parameter int unsigned R  = SD_R,       // syndrome bits
  parameter int unsigned PB = BPC,        // parity bits per parity cell
  parameter logic [R-1:0][2*NC-1:0] H = H_DATA
) (
  input  logic [R-1:0]        s,
  output logic [NC-1:0]       hit,
  output logic [NC-1:0][1:0]  pat,
  output logic                par_err,
  output logic                unmatched
);

  localparam int unsigned NPC = (R + PB - 1) / PB;

  function automatic logic [R-1:0] col(input int unsigned j);
    logic [R-1:0] c;
    for (int unsigned r = 0; r < R; r++) c[r] = H[r][j];
    return c;
  endfunction

  always_comb begin
    logic m_lo, m_hi, m_both;
    logic [R-1:0] mask;
    for (int unsigned c = 0; c < NC; c++) begin
      m_lo   = (s == col(2*c));
      m_hi   = (s == col(2*c+1));
      m_both = (s == (col(2*c) ^ col(2*c+1)));
      hit[c] = m_lo | m_hi | m_both;
      pat[c] = {m_hi | m_both, m_lo | m_both};
    end
    par_err = 1'b0;
    for (int unsigned q = 0; q < NPC; q++) begin
      mask = '0;
      for (int unsigned r = q * PB; r < (q + 1) * PB && r < R; r++) mask[r] = 1'b1;
      if ((s != '0) && ((s & ~mask) == '0)) par_err = 1'b1;
    end
    unmatched = (s != '0) && !(|hit) && !par_err;
  end

  // The code gives each correctable data-cell error its own syndrome, so at
  // most one cell can be located, and never together with a parity cell.
  always_comb begin
    assert ($onehot0(hit) && !(par_err && (|hit)))
      else $error("error_locator: syndrome %b matches more than one error", s);
  end

endmodule
