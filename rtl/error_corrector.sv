// error_corrector: repairs the located cell and raises correct_data.
//
// Every data cell is XORed with {ip_syn, pat[c]} gated by hit[c]: the two low
// bits take the pattern found by the SEC-DAEC locator and the upper bits take
// the interleaved parity syndrome, since only one cell is assumed faulty.
// At most one hit bit is set, so no multiplexer is needed.
//
// correct_data follows the document's decision flow:
//   all syndromes zero                  -> data as read, correct_data = 1
//   SEC-DAEC syndrome locates a cell    -> corrected data, correct_data = 1
//   SEC-DAEC syndrome zero, IP non-zero -> data as read, correct_data = 0
// This design adds: an error confined to a parity cell (par_err, IP syndrome
// zero) leaves the data intact, correct_data = 1; a syndrome that matches no
// single-cell error (unmatched, or par_err with a non-zero IP syndrome) gives
// data as read and correct_data = 0. status reports which case applied.
//
// Interface: cells_rd (data cells), ip_syn, sd_zero, hit, pat, par_err in;
// cells_out, correct_data, status out. Purely combinational.
module error_corrector
  import ipdaec_pkg::*;
#(
  parameter int unsigned NC = N_DCELLS,
  parameter int unsigned PB = BPC,
  parameter int unsigned NI = N_IP
) (
  input  logic [NC-1:0][PB-1:0] cells_rd,
  input  logic [NI-1:0]         ip_syn,
  input  logic                  sd_zero,
  input  logic [NC-1:0]         hit,
  input  logic [NC-1:0][1:0]    pat,
  input  logic                  par_err,
  output logic [NC-1:0][PB-1:0] cells_out,
  output logic                  correct_data,
  output dec_status_t           status
);

  logic ip_zero;
  assign ip_zero = (ip_syn == '0);

  always_comb begin
    for (int unsigned c = 0; c < NC; c++)
      cells_out[c] = cells_rd[c] ^ ({ip_syn, pat[c]} & {PB{hit[c]}});

    if (sd_zero && ip_zero)       status = DEC_CLEAN;
    else if (|hit)                status = DEC_CORRECTED;
    else if (par_err && ip_zero)  status = DEC_PARITY_CELL;
    else                          status = DEC_UNCORR;
    correct_data = (status != DEC_UNCORR);
  end

endmodule
