// ipdaec_encoder: IP-DAEC encoder for a 32-bit word in 3-bit MLC cells.
//
// Two parity computations run side by side on the write data:
//   * ip_encoder: the interleaved parity bit(s) over the upper bit of every
//     data cell (p_ip = d3 ^ d6 ^ ... ^ d30 in 1-based numbering);
//   * secdaec_encoder: the six SEC-DAEC parity bits over the two low bits of
//     every data cell (22 bits).
// The data, the IP bit and the parity bits are then placed into the 13 cells
// of a memory word as described in ipdaec_pkg (11 data cells, the IP bit in
// the upper bit of the last data cell, two cells holding three parity bits
// each). The layout follows the document's improved 13-cell design.
//
// Interface: data (DATA_W bits) in, cw (N_CELLS cells of BPC bits) out.
// Purely combinational.
module ipdaec_encoder
  import ipdaec_pkg::*;
(
  input  data_t     data,
  output codeword_t cw
);

  logic [SD_K-1:0] u;
  logic [IP_K-1:0] ipd;
  logic [N_IP-1:0] p_ip;
  logic [SD_R-1:0] p_sd;

  // Two low bits of each data cell feed the SEC-DAEC code.
  always_comb begin
    for (int unsigned c = 0; c < N_DCELLS; c++)
      for (int unsigned b = 0; b < 2; b++)
        u[2*c+b] = data[slot_index(c, b)];
  end

  // Upper-bit slots that hold data feed the interleaved parity.
  always_comb begin
    for (int unsigned j = 0; j < IP_K; j++)
      ipd[j] = data[slot_index(j / N_IP, 2 + j % N_IP)];
  end

  ip_encoder #(.K(IP_K), .T(N_IP)) u_ip (.d(ipd), .p(p_ip));

  secdaec_encoder u_sd (.u(u), .p(p_sd));

  always_comb begin
    int unsigned idx;
    for (int unsigned c = 0; c < N_DCELLS; c++)
      for (int unsigned b = 0; b < BPC; b++) begin
        idx = slot_index(c, b);
        cw[c][b] = (idx < DATA_W) ? data[idx] : p_ip[idx - DATA_W];
      end
    for (int unsigned c = N_DCELLS; c < N_CELLS; c++)
      for (int unsigned b = 0; b < BPC; b++) begin
        idx = (c - N_DCELLS) * BPC + b;
        cw[c][b] = (idx < SD_R) ? p_sd[idx] : 1'b0;
      end
  end

endmodule
