// secdaec_syndrome: syndrome generator of the (28,22) SEC-DAEC code.
//
// S = C' * H^T with H = [I_R | P]: syndrome bit r is the read parity bit
// p_rd[r] XORed with the parity recomputed from the read data u_rd. A zero
// syndrome means the covered bits are error free; a single error on u[j]
// gives column j of P, a double adjacent error gives the XOR of two columns.
//
// Interface: u_rd (K bits), p_rd (R bits) in; s (R bits) out.
// Purely combinational.
module secdaec_syndrome
  import ipdaec_pkg::*;
#(
  parameter int unsigned K = SD_K,
  parameter int unsigned R = SD_R,
  parameter logic [R-1:0][K-1:0] H = H_DATA
) (
  input  logic [K-1:0] u_rd,
  input  logic [R-1:0] p_rd,
  output logic [R-1:0] s
);

  logic [R-1:0] p_re;

  secdaec_encoder #(.K(K), .R(R), .H(H)) u_recalc (.u(u_rd), .p(p_re));

  assign s = p_rd ^ p_re;

endmodule
