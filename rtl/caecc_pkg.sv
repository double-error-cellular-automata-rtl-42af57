// caecc_pkg: constants and types shared by the (15,7,5) cellular-automata ECC
// and the skip-mode compact-syndrome-coding (CSC) front end.
//
// Code: n = 15 code bits, k = 7 information bits, n-k = 8 check bits, minimum
// distance 5, so up to two bit errors per 15-bit block are corrected.
// All ECC vectors use ascending ranges [0:W-1] so that bit 0 is the leftmost
// character of a printed binary string, which is how the vectors m, cb, S,
// Saug and E are written in the examples.
//
// The 7-cell CA is a periodic-boundary linear CA. Each cell's rule is a 3-bit
// mask over {left, self, right} neighbours (4 = left, 2 = self, 1 = right):
// 7 = rule 150, 5 = rule 90, 4 = rule 240. The rule vector, the check matrix T
// and the g(Q) matrix are this design's choice: they reproduce the worked
// decoder example (m' = 0101001 gives CA state 0010111 after 3 cycles and
// check bits 10100011; m = 0101101 gives cb = 11011101) and give a code of
// minimum distance 5. G = T * (Tk^3)^-1 over GF(2).
package caecc_pkg;

  localparam int unsigned CA_K = 7;              // information bits / CA cells
  localparam int unsigned CA_N = 15;             // code length
  localparam int unsigned CA_R = CA_N - CA_K;    // check bits
  localparam int unsigned CA_WORK_CYCLES = 3;    // CA runs 3 cycles (Tk^3)

  typedef logic [0:CA_K-1] info_t;
  typedef logic [0:CA_R-1] chk_t;
  typedef logic [0:CA_N-1] code_t;

  // Neighbour masks per cell, cell 0 first: 150,90,150,150,90,240,150.
  localparam logic [2:0] CA_RULE [CA_K] = '{3'd7, 3'd5, 3'd7, 3'd7, 3'd5, 3'd4, 3'd7};

  // Check matrix T (rows = check bits, columns = information bits).
  localparam info_t T_ROWS [CA_R] = '{
    7'b1101011, 7'b0101110, 7'b1110110, 7'b1001101,
    7'b1000110, 7'b1110101, 7'b1011100, 7'b1111001};

  // g(Q) matrix applied to the CA state after 3 work cycles.
  localparam info_t G_ROWS [CA_R] = '{
    7'b1001100, 7'b1011111, 7'b1111110, 7'b1100011,
    7'b0000011, 7'b1101110, 7'b0101010, 7'b0010101};

  // One CA step, shared by the RTL cell array and reference models.
  function automatic info_t ca_step(info_t q);
    info_t nq;
    for (int i = 0; i < CA_K; i++) begin
      logic l, r;
      l = q[(i + CA_K - 1) % CA_K];
      r = q[(i + 1) % CA_K];
      nq[i] = (CA_RULE[i][2] & l) ^ (CA_RULE[i][1] & q[i]) ^ (CA_RULE[i][0] & r);
    end
    return nq;
  endfunction

  // T * m over GF(2).
  function automatic chk_t t_mul(info_t m);
    chk_t c;
    for (int r = 0; r < CA_R; r++) c[r] = ^(T_ROWS[r] & m);
    return c;
  endfunction

  // ---------------------------------------------------------------------
  // PUF response geometry (256-bit key example)
  // ---------------------------------------------------------------------
  localparam int unsigned KEY_BITS   = 256;                          // s_k
  localparam int unsigned NBLOCKS    = (KEY_BITS + CA_K - 1) / CA_K; // ceil(256/7) = 37
  localparam int unsigned RESP_BITS  = NBLOCKS * CA_N;               // 555
  localparam int unsigned MAX_RO     = 18;                           // largest CSC group
  localparam int unsigned CSC_W      = 53;                           // ceil(log2(18!))

  // Number of CSC bits of a group of g ROs: ceil(log2(g!)), 0 for g < 2.
  function automatic int unsigned csc_bits(int unsigned g);
    longint unsigned f;
    int unsigned b;
    f = 1;
    for (int unsigned i = 2; i <= g; i++) f = f * i;
    b = 0;
    while ((64'd1 << b) < f) b++;
    return b;
  endfunction

  typedef logic [5:0] csc_bits_tab_t [MAX_RO + 1];

  function automatic csc_bits_tab_t csc_bits_table();
    csc_bits_tab_t t;
    for (int unsigned g = 0; g <= MAX_RO; g++) t[g] = 6'(csc_bits(g));
    return t;
  endfunction

  // ceil(log2(g!)) for g = 0..18, computed at elaboration time.
  localparam csc_bits_tab_t CSC_BITS_TAB = csc_bits_table();

endpackage
