// ip_syndrome: interleaved parity syndrome generator.
//
// Recomputes the interleaved parity of the read data d_rd with ip_encoder and
// XORs it with the parity bits read from memory: s[i] = p_rd[i] ^ p''[i].
// An all-zero s means no error on the covered bits; otherwise s is the error
// pattern of the affected group of t adjacent bits (the position of the
// group is not known from s alone). In the IP-DAEC decoder s is the error
// pattern on the upper bits of the faulty cell. Follows the document's
// syndrome equations.
//
// Interface: d_rd (K bits), p_rd (T bits) in; s (T bits) out.
// Purely combinational.
module ip_syndrome #(
  parameter int unsigned K = ipdaec_pkg::IP_K,
  parameter int unsigned T = ipdaec_pkg::N_IP
) (
  input  logic [K-1:0] d_rd,
  input  logic [T-1:0] p_rd,
  output logic [T-1:0] s
);

  logic [T-1:0] p_re;

  ip_encoder #(.K(K), .T(T)) u_recalc (.d(d_rd), .p(p_re));

  assign s = p_rd ^ p_re;

endmodule
