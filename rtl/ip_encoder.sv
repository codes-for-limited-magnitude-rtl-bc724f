// ip_encoder: interleaved parity (IP) generator.
//
// With t parity bits over k data bits, parity bit i is the XOR of every t-th
// data bit starting at bit i: p[i] = d[i] ^ d[i+t] ^ d[i+2t] ^ ...
// (bits numbered from 0). Any error confined to t consecutive data bits
// leaves its bit pattern, rotated into place, in the parity difference.
//
// In the IP-DAEC word the data vector is the list of upper-bit slots of the
// data cells, and t is the number of upper bits per cell (cells of 3 bits:
// t = 1, so the one IP bit is the XOR of all upper data bits). The formula is
// the document's; K and T default to that configuration.
//
// Interface: d (K bits) in, p (T bits) out. Purely combinational.
module ip_encoder #(
  parameter int unsigned K = ipdaec_pkg::IP_K,
  parameter int unsigned T = ipdaec_pkg::N_IP
) (
  input  logic [K-1:0] d,
  output logic [T-1:0] p
);

  always_comb begin
    p = '0;
    for (int unsigned j = 0; j < K; j++) p[j % T] ^= d[j];
  end

endmodule
