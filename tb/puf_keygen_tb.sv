// puf_keygen_tb: end-to-end test of the key generator at its default sizes
// (256-bit key, 37 blocks of 15 bits, up to 64 groups).
// An RO array of ten 18-RO groups and one 13-RO group (193 ROs) is enrolled;
// the key and every helper word are checked against the reference chain
// (CSC -> skip placement -> T * m). Reconstructions then follow with the same
// counts, with one adjacent-rank flip in a random group (must be corrected),
// with several flips, with fresh random counts (blocks must be flagged
// uncorrectable) and with a short response of few groups. The helper memory
// is modelled here with a one-cycle read latency. Each mechanism (enrollment,
// reconstruction, skip splitting of a group across rounds, single and double
// corrections, uncorrectable blocks, short response) must occur at least once.
module puf_keygen_tb;
  import caecc_ref_pkg::*;

  localparam int FW = 16;
  localparam int NBLK = 37;

  logic clk = 0, rst_n = 0, mode = 0;
  logic grp_valid = 0, grp_ready, grp_last = 0;
  logic [4:0] grp_size = '0;
  logic [FW-1:0] grp_freq [18];
  logic nvm_we, nvm_re;
  logic [5:0] nvm_addr;
  logic [0:7] nvm_wdata, nvm_rdata;
  logic key_valid;
  logic [0:255] key;
  logic [15:0] corrected_bits, skip_visits;
  logic [7:0] corrected_blocks, double_blocks, fail_blocks;
  logic short_resp;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_enroll = 0, n_recon = 0, n_split = 0, n_single = 0, n_double = 0, n_fail = 0, n_short = 0;

  logic [0:7] nvm [NBLK];

  puf_keygen dut (
    .clk, .rst_n, .mode, .grp_valid, .grp_ready, .grp_size, .grp_freq, .grp_last,
    .nvm_we, .nvm_re, .nvm_addr, .nvm_wdata, .nvm_rdata,
    .key_valid, .key, .corrected_bits, .corrected_blocks, .double_blocks,
    .fail_blocks, .short_resp, .skip_visits
  );

  always #5 clk = ~clk;

  // helper data memory model
  always_ff @(posedge clk) begin
    if (nvm_we) nvm[nvm_addr] <= nvm_wdata;
    if (nvm_re) nvm_rdata <= nvm[nvm_addr];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ro   [64][18];   // enrolled counts
  int          gsz  [64];
  int          ngrp;

  // one session: stream the groups, wait for the key
  task automatic session(bit enroll, int unsigned f[64][18], int ng, int sz[64]);
    mode = enroll;
    for (int g = 0; g < ng; g++) begin
      grp_valid = 1; grp_size = 5'(sz[g]); grp_last = (g == ng - 1);
      for (int i = 0; i < 18; i++) grp_freq[i] = FW'(f[g][i]);
      @(posedge clk);
      while (!grp_ready) @(posedge clk);
      #1 grp_valid = 0;
    end
    grp_last = 0;
    while (!key_valid) @(posedge clk);
    #1;
    if (enroll) n_enroll++; else n_recon++;
    if (int'(skip_visits) > ng) n_split++;
    if (short_resp) n_short++;
  endtask

  // reference key and helper words for a set of counts
  task automatic reference(int unsigned f[64][18], int ng, int sz[64],
                           output logic [0:255] k, output logic [0:7] h[NBLK]);
    longint unsigned code [64];
    int nbits [64];
    bit resp[];
    int nvis;
    logic [0:6] m;
    logic [0:7] c;
    for (int g = 0; g < ng; g++) begin
      code[g]  = ref_csc(sz[g], f[g]);
      nbits[g] = ref_csc_bits(sz[g]);
    end
    ref_skip(ng, code, nbits, NBLK, resp, nvis);
    for (int b = 0; b < NBLK; b++) begin
      for (int j = 0; j < 7; j++) m[j] = resp[b * 15 + j];
      for (int j = 0; j < 8; j++) c[j] = resp[b * 15 + 7 + j];
      h[b] = c ^ ref_cb(m);
      for (int j = 0; j < 7; j++) if (b * 7 + j < 256) k[b * 7 + j] = m[j];
    end
  endtask

  // swap the counts of the ROs ranked r and r+1 in group g
  task automatic adjacent_flip(ref int unsigned f[64][18], input int g, input int sz);
    int idx [18];
    int r, a, b, t;
    for (int i = 0; i < sz; i++) idx[i] = i;
    for (int i = 0; i < sz; i++)               // sort indices by count
      for (int j = 0; j < sz - 1 - i; j++)
        if (f[g][idx[j]] > f[g][idx[j + 1]]) begin t = idx[j]; idx[j] = idx[j + 1]; idx[j + 1] = t; end
    r = $urandom_range(sz - 2);
    a = idx[r]; b = idx[r + 1];
    t = f[g][a]; f[g][a] = f[g][b]; f[g][b] = t;
  endtask

  task automatic expect_key(string name, logic [0:255] k);
    checks++;
    if (key !== k) begin failures++; $display("FAIL %s: key mismatch\n got %b\n exp %b", name, key, k); end
  endtask

  initial begin
    logic [0:255] key_ref, key_enr;
    logic [0:7] h_ref [NBLK];
    int unsigned f [64][18];
    int bad;
    foreach (grp_freq[i]) grp_freq[i] = '0;
    // 193 ROs: ten 18-RO groups and one 13-RO group, distinct counts
    ngrp = 11;
    for (int g = 0; g < 64; g++) gsz[g] = (g < 10) ? 18 : 13;
    for (int g = 0; g < 64; g++)
      for (int i = 0; i < 18; i++) ro[g][i] = 20000 + 1000 * i + $urandom_range(999);
    for (int g = 0; g < ngrp; g++)                 // shuffle order inside each group
      for (int i = gsz[g] - 1; i > 0; i--) begin
        int j; int unsigned t;
        j = $urandom_range(i);
        t = ro[g][i]; ro[g][i] = ro[g][j]; ro[g][j] = t;
      end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // enrollment
    session(1, ro, ngrp, gsz);
    reference(ro, ngrp, gsz, key_ref, h_ref);
    expect_key("enroll", key_ref);
    key_enr = key;
    bad = 0;
    for (int b = 0; b < NBLK; b++) if (nvm[b] !== h_ref[b]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d helper words differ", bad); end
    checks++;
    if (short_resp) begin failures++; $display("FAIL 193 ROs reported short"); end

    // reconstruction, same counts
    session(0, ro, ngrp, gsz);
    expect_key("clean", key_enr);
    checks++;
    if (corrected_bits != 0 || fail_blocks != 0) begin failures++; $display("FAIL clean reading corrected"); end

    // one adjacent-rank flip in one group: at most two bits per block, always corrected
    for (int t = 0; t < 30; t++) begin
      int g;
      f = ro;
      g = $urandom_range(ngrp - 1);
      adjacent_flip(f, g, gsz[g]);
      session(0, f, ngrp, gsz);
      expect_key("1 flip", key_enr);
      checks++;
      if (fail_blocks != 0) begin failures++; $display("FAIL 1 flip: uncorrectable block"); end
      if (corrected_blocks > double_blocks) n_single++;
      if (double_blocks != 0) n_double++;
    end

    // several flips: statistics only
    for (int t = 0; t < 10; t++) begin
      f = ro;
      for (int n = 0; n < 3; n++) begin
        int g;
        g = $urandom_range(ngrp - 1);
        adjacent_flip(f, g, gsz[g]);
      end
      session(0, f, ngrp, gsz);
      $display("3 flips: key %s, %0d bits corrected in %0d blocks, %0d blocks uncorrectable",
               (key === key_enr) ? "ok" : "wrong", corrected_bits, corrected_blocks, fail_blocks);
      if (fail_blocks != 0) n_fail++;
    end

    // unrelated counts: most blocks must be flagged
    for (int g = 0; g < ngrp; g++)
      for (int i = 0; i < 18; i++) f[g][i] = $urandom_range(65535);
    session(0, f, ngrp, gsz);
    checks++;
    if (fail_blocks == 0) begin failures++; $display("FAIL random counts not flagged"); end
    else n_fail++;

    // short response: five 10-RO groups give 5 * 22 = 110 bits
    for (int g = 0; g < 64; g++) gsz[g] = 10;
    session(1, ro, 5, gsz);
    reference(ro, 5, gsz, key_ref, h_ref);
    expect_key("short enroll", key_ref);
    checks++;
    if (!short_resp) begin failures++; $display("FAIL short flag"); end
    session(0, ro, 5, gsz);
    expect_key("short recon", key_ref);

    $display("mechanisms: enroll %0d recon %0d split %0d single %0d double %0d fail %0d short %0d",
             n_enroll, n_recon, n_split, n_single, n_double, n_fail, n_short);
    checks += 7;
    if (n_enroll == 0) failures++;
    if (n_recon == 0) failures++;
    if (n_split == 0) failures++;
    if (n_single == 0) failures++;
    if (n_double == 0) failures++;
    if (n_fail == 0) failures++;
    if (n_short == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
