// ipdaec_decoder: IP-DAEC decoder for a 32-bit word in 3-bit MLC cells.
//
// The word read from memory is split as laid out in ipdaec_pkg and goes
// through four blocks:
//   1. ip_syndrome      : IP syndrome over the upper bits of the data cells;
//   2. secdaec_syndrome : SEC-DAEC syndrome over the two low bits of the data
//                         cells and the six parity bits (runs beside 1.);
//   3. error_locator    : matches the SEC-DAEC syndrome against the single
//                         and in-cell double adjacent errors of each cell;
//   4. error_corrector  : XORs the located cell with {IP syndrome, low-bit
//                         pattern} and decides correct_data.
// All of this is the document's decoder structure. Any single-cell error of
// magnitude up to 3 levels in either direction is corrected. An error that
// touches only upper bits (magnitude 4 or more) is reported with
// correct_data = 0 and the data passed through as read.
//
// Interface: cw (N_CELLS cells) in; data, correct_data, status out.
// Purely combinational (the critical path is the SEC-DAEC syndrome and the
// locator's comparisons).
module ipdaec_decoder
  import ipdaec_pkg::*;
(
  input  codeword_t   cw,
  output data_t       data,
  output logic        correct_data,
  output dec_status_t status
);

  logic [SD_K-1:0]               u_rd;
  logic [IP_K-1:0]               ipd_rd;
  logic [N_IP-1:0]               pip_rd;
  logic [SD_R-1:0]               psd_rd;
  logic [N_DCELLS-1:0][BPC-1:0]  cells_rd, cells_out;
  ip_syn_t                       s_ip;
  sd_syn_t                       s_sd;
  logic [N_DCELLS-1:0]           hit;
  logic [N_DCELLS-1:0][1:0]      pat;
  logic                          par_err, unmatched;

  always_comb begin
    int unsigned idx;
    for (int unsigned c = 0; c < N_DCELLS; c++) begin
      cells_rd[c] = cw[c];
      for (int unsigned b = 0; b < 2; b++) u_rd[2*c+b] = cw[c][b];
    end
    for (int unsigned j = 0; j < IP_K; j++) ipd_rd[j] = cw[j / N_IP][2 + j % N_IP];
    for (int unsigned i = 0; i < N_IP; i++) begin
      idx = DATA_W + i;
      pip_rd[i] = cw[idx / BPC][idx % BPC];
    end
    for (int unsigned r = 0; r < SD_R; r++) psd_rd[r] = cw[N_DCELLS + r / BPC][r % BPC];
  end

  ip_syndrome #(.K(IP_K), .T(N_IP)) u_ip_syn (.d_rd(ipd_rd), .p_rd(pip_rd), .s(s_ip));

  secdaec_syndrome u_sd_syn (.u_rd(u_rd), .p_rd(psd_rd), .s(s_sd));

  error_locator u_loc (
    .s(s_sd), .hit(hit), .pat(pat), .par_err(par_err), .unmatched(unmatched)
  );

  error_corrector u_cor (
    .cells_rd(cells_rd), .ip_syn(s_ip), .sd_zero(s_sd == '0), .hit(hit), .pat(pat),
    .par_err(par_err), .cells_out(cells_out), .correct_data(correct_data), .status(status)
  );

  // A syndrome that fits no single-cell error must never be reported as a
  // correct output.
  always_comb begin
    assert (!unmatched || (status == DEC_UNCORR && !correct_data))
      else $error("ipdaec_decoder: unmatched syndrome %b reported as correct", s_sd);
  end

  always_comb begin
    data = '0;
    for (int unsigned c = 0; c < N_DCELLS; c++)
      for (int unsigned b = 0; b < BPC; b++)
        if (slot_index(c, b) < DATA_W) data[slot_index(c, b)] = cells_out[c][b];
  end

endmodule
