// secdaec_encoder: parity generator of the (28,22) SEC-DAEC code.
//
// Systematic code with H = [I_R | P]: parity bit r is the XOR of the data
// bits u[j] whose column j has a 1 in row r of P, i.e. p = u * P^T over
// GF(2). The matrix is ipdaec_pkg::H_DATA (taken from the document's low
// redundancy (28,22) code). u holds the two low bits of every data cell.
//
// Interface: u (K bits) in, p (R bits) out. Purely combinational; each
// parity bit is one XOR tree of 11 to 13 inputs.
module secdaec_encoder
  import ipdaec_pkg::*;
#(
  parameter int unsigned K = SD_K,
  parameter int unsigned R = SD_R,
  parameter logic [R-1:0][K-1:0] H = H_DATA
) (
  input  logic [K-1:0] u,
  output logic [R-1:0] p
);

  always_comb begin
    for (int unsigned r = 0; r < R; r++) p[r] = ^(u & H[r]);
  end

endmodule
