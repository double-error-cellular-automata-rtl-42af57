// gq_logic: the g(Q) block of the CA-ECC encoder.
//
// Combinational GF(2) matrix G (8 x 7, caecc_pkg::G_ROWS) applied to the CA
// state Q after three work cycles: cb = G * Q = G * Tk^3 * m = T * m.
// G is derived from Tk^3 and T as G = T * (Tk^3)^-1; its values are this
// design's choice. No clock; output follows input combinationally.
module gq_logic
  import caecc_pkg::*;
(
  input  info_t q,
  output chk_t  cb
);

  always_comb begin
    for (int r = 0; r < CA_R; r++) cb[r] = ^(G_ROWS[r] & q);
  end

endmodule
