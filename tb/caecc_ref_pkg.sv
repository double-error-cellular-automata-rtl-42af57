// caecc_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the CA step spells out each cell's
// equation, the check bits use the 8 x 7 check matrix T directly (the RTL
// encoder goes through the CA and g(Q)), the CSC reference sums
// inv_i * (i-1)! instead of the RTL's multiply-accumulate loop, and the skip
// placement builds the whole tmpVector before slicing it into columns.
package caecc_ref_pkg;

  // Check matrix T, one 7-bit row per check bit, leftmost = information bit 0.
  localparam logic [0:6] REF_T [8] = '{
    7'b1101011, 7'b0101110, 7'b1110110, 7'b1001101,
    7'b1000110, 7'b1110101, 7'b1011100, 7'b1111001};

  function automatic logic [0:7] ref_cb(logic [0:6] m);
    logic [0:7] c;
    for (int r = 0; r < 8; r++) begin
      c[r] = 1'b0;
      for (int j = 0; j < 7; j++) c[r] ^= REF_T[r][j] & m[j];
    end
    return c;
  endfunction

  // Periodic boundary; rules 150, 90, 150, 150, 90, 240, 150.
  function automatic logic [0:6] ref_ca_step(logic [0:6] q);
    logic [0:6] n;
    n[0] = q[6] ^ q[0] ^ q[1];
    n[1] = q[0] ^ q[2];
    n[2] = q[1] ^ q[2] ^ q[3];
    n[3] = q[2] ^ q[3] ^ q[4];
    n[4] = q[3] ^ q[5];
    n[5] = q[4];
    n[6] = q[5] ^ q[6] ^ q[0];
    return n;
  endfunction

  function automatic int ref_csc_bits(int g);
    longint unsigned f = 1;
    int b = 0;
    for (int i = 2; i <= g; i++) f *= longint'(i);
    while ((64'd1 << b) < f) b++;
    return b;
  endfunction

  // Lehmer-style CSC value: sum over i of inv_i * (i-1)!
  function automatic longint unsigned ref_csc(int g, int unsigned f[18]);
    longint unsigned c = 0, fact;
    for (int i = 2; i <= g; i++) begin
      int inv = 0;
      for (int j = 1; j < i; j++) if (f[i-1] <= f[j-1]) inv++;
      fact = 1;
      for (int t = 2; t < i; t++) fact *= longint'(t);
      c += longint'(inv) * fact;
    end
    return c;
  endfunction

  // Skip-mode placement into nblk blocks of 15 bits. resp[b*15 + j] = bit j of block b.
  function automatic void ref_skip(input int ng, input longint unsigned code[64],
                                   input int nbits[64], input int nblk,
                                   output bit resp[], output int nvisits);
    bit tmp[$];
    int rem[64];
    int left = 0;
    for (int g = 0; g < ng; g++) begin rem[g] = nbits[g]; left += nbits[g]; end
    nvisits = 0;
    while (left > 0) begin
      for (int g = 0; g < ng; g++) begin
        int step = (rem[g] < nblk) ? rem[g] : nblk;
        if (step > 0 && tmp.size() < nblk * 15) nvisits++;
        for (int s = 0; s < step; s++) begin
          tmp.push_back(code[g][rem[g] - 1]);   // most significant bit first
          rem[g]--;
          left--;
        end
      end
    end
    resp = new[nblk * 15];
    foreach (resp[i]) resp[i] = 0;
    for (int p = 0; p < tmp.size() && p < nblk * 15; p++)
      resp[(p % nblk) * 15 + (p / nblk)] = tmp[p];
  endfunction

endpackage
