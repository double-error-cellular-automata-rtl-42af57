// saug_map: the SaugMap block of the CA-ECC decoder.
//
// Combinational map from the 8-bit syndrome S to the 7-bit augmented syndrome
// Saug, built from every permissible error vector Ep (weight 0, 1 or 2 over the
// 15 code bits) through Taug * Ep = (S | Saug). With the Taug^-1 of this code,
// Saug equals the information part of Ep, so the table is: for each Ep,
// entry[T * Ep[0:6] ^ Ep[7:14]] = Ep[0:6]. The 121 entries are distinct because
// the code has minimum distance 5. The table is computed at elaboration time
// from caecc_pkg::T_ROWS and realised as a 256-entry constant lookup.
// `hit` is low for a syndrome that no permissible error vector produces (three
// or more errors); Saug is then zero. The `hit` flag is this design's addition.
module saug_map
  import caecc_pkg::*;
(
  input  chk_t  s,
  output info_t saug,
  output logic  hit
);

  // entry bit 7 = hit, bits 6..0 = Saug (Saug bit 0 in entry bit 6)
  typedef logic [(1 << CA_R)-1:0][CA_K:0] table_t;

  function automatic table_t build_table();
    table_t tab;
    code_t  ep;
    chk_t   syn_v;
    tab = '0;
    // all error vectors with positions a <= b; a == b == CA_N means no error,
    // a < CA_N == b means a single error
    for (int a = 0; a <= CA_N; a++) begin
      for (int b = a; b <= CA_N; b++) begin
        if (a == b && a != CA_N) continue;
        ep = '0;
        if (a < CA_N) ep[a] = 1'b1;
        if (b < CA_N) ep[b] = 1'b1;
        syn_v = t_mul(ep[0:CA_K-1]) ^ ep[CA_K:CA_N-1];
        tab[syn_v] = {1'b1, ep[0:CA_K-1]};
      end
    end
    return tab;
  endfunction

  localparam table_t SAUG_TABLE = build_table();

  always_comb begin
    saug = SAUG_TABLE[s][CA_K-1:0];
    hit  = SAUG_TABLE[s][CA_K];
  end

endmodule
