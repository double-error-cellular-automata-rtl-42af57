// skip_flip_stats_tb: maximum number of bit errors per 15-bit ECC block caused
// by adjacent-rank flips, with skip-mode placement. For each replication an RO
// array is drawn, its response is built by csc_encoder and skip_mode_mapper,
// then 1, 2, 3 or 4 adjacent-rank swaps are applied in random groups and the
// response is rebuilt; the largest per-block Hamming distance is recorded.
// Two configurations: 18-RO groups (ten of 18 plus one of 13) and the
// conservative 14-RO groups (fifteen of 14). A single adjacent flip must never
// put more than two errors into a block.
module skip_flip_stats_tb;
  localparam int NBLK = 37;
  localparam int REPS = 1000;
  localparam int FW = 16;

  logic clk = 0, rst_n = 0;
  logic csc_start = 0, csc_busy, csc_done;
  logic [4:0] size = '0;
  logic [FW-1:0] freq [18];
  logic [52:0] code;
  logic [5:0] nbits;
  logic grp_we = 0, map_start = 0, map_busy, map_done, short_resp;
  logic [6:0] grp_idx = '0, ngroups = '0;
  logic [15:0] placed, visits;
  logic [0:14] resp [NBLK];
  int checks = 0, failures = 0;

  csc_encoder #(.FW(FW)) u_csc (.clk, .rst_n, .start(csc_start), .size, .freq,
                                .busy(csc_busy), .done(csc_done), .code, .nbits);
  skip_mode_mapper u_map (.clk, .rst_n, .grp_we, .grp_idx, .grp_code(code), .grp_bits(nbits),
                          .start(map_start), .ngroups, .busy(map_busy), .done(map_done),
                          .short_resp, .placed, .visits, .resp);

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build(int unsigned f[16][18], int ng, int sz[16], output logic [0:14] r[NBLK]);
    for (int g = 0; g < ng; g++) begin
      size = 5'(sz[g]);
      for (int i = 0; i < 18; i++) freq[i] = FW'(f[g][i]);
      csc_start = 1;
      @(posedge clk); #1 csc_start = 0;
      while (!csc_done) begin @(posedge clk); #1; end
      grp_we = 1; grp_idx = 7'(g);
      @(posedge clk); #1 grp_we = 0;
    end
    ngroups = 7'(ng); map_start = 1;
    @(posedge clk); #1 map_start = 0;
    while (!map_done) begin @(posedge clk); #1; end
    r = resp;
  endtask

  task automatic adjacent_flip(ref int unsigned f[16][18], input int g, input int sz);
    int idx [18];
    int r, a, b, t;
    for (int i = 0; i < sz; i++) idx[i] = i;
    for (int i = 0; i < sz; i++)
      for (int j = 0; j < sz - 1 - i; j++)
        if (f[g][idx[j]] > f[g][idx[j + 1]]) begin t = idx[j]; idx[j] = idx[j + 1]; idx[j + 1] = t; end
    r = $urandom_range(sz - 2);
    a = idx[r]; b = idx[r + 1];
    t = f[g][a]; f[g][a] = f[g][b]; f[g][b] = t;
  endtask

  initial begin
    int unsigned ro [16][18];
    int unsigned f [16][18];
    int sz [16];
    int ng, worst, mx;
    int hist [2][5][16];
    logic [0:14] base [NBLK];
    logic [0:14] fl [NBLK];
    foreach (freq[i]) freq[i] = '0;
    foreach (hist[a, b, c]) hist[a][b][c] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cfg = 0; cfg < 2; cfg++) begin
      ng = (cfg == 0) ? 11 : 15;
      for (int g = 0; g < 16; g++) sz[g] = (cfg == 1) ? 14 : ((g < 10) ? 18 : 13);
      for (int rep = 0; rep < REPS; rep++) begin
        for (int g = 0; g < ng; g++) begin
          for (int i = 0; i < 18; i++) ro[g][i] = 20000 + 1000 * i + $urandom_range(999);
          for (int i = sz[g] - 1; i > 0; i--) begin
            int j; int unsigned t;
            j = $urandom_range(i);
            t = ro[g][i]; ro[g][i] = ro[g][j]; ro[g][j] = t;
          end
        end
        build(ro, ng, sz, base);
        for (int nf = 1; nf <= 4; nf++) begin
          f = ro;
          for (int k = 0; k < nf; k++) begin
            int g;
            g = $urandom_range(ng - 1);
            adjacent_flip(f, g, sz[g]);
          end
          build(f, ng, sz, fl);
          mx = 0;
          for (int b = 0; b < NBLK; b++) begin
            int d;
            d = $countones(base[b] ^ fl[b]);
            if (d > mx) mx = d;
          end
          hist[cfg][nf][mx]++;
          if (nf == 1) begin
            checks++;
            if (mx > 2) begin failures++; $display("FAIL one flip gave %0d errors in a block", mx); end
          end
        end
      end
      for (int nf = 1; nf <= 4; nf++) begin
        string s;
        s = "";
        worst = 0;
        for (int e = 0; e < 16; e++) if (hist[cfg][nf][e] != 0) begin
          s = {s, $sformatf(" %0d:%0d", e, hist[cfg][nf][e])};
          worst = e;
        end
        $display("%s, %0d adjacent flip(s): max errors per block (value:count)%s; worst %0d",
                 (cfg == 0) ? "18-RO groups" : "14-RO groups", nf, s, worst);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
