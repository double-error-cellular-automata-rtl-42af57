// taug_inv: the Taug^-1 block of the CA-ECC decoder.
//
// Combinational product E = Taug^-1 * (S | Saug) with
//   Taug^-1 = [ 0(k x n-k)   I(k) ]
//             [ I(n-k)       T    ]
// so the information part of the error vector is Saug and the check part is
// S ^ T * Saug. Output follows input; no clock.
module taug_inv
  import caecc_pkg::*;
(
  input  chk_t  s,
  input  info_t saug,
  output code_t e
);

  always_comb begin
    e[0:CA_K-1]      = saug;
    e[CA_K:CA_N-1]   = s ^ t_mul(saug);
  end

endmodule
