// skip_mode_mapper_tb: loads group codes into the mapper and compares the
// 37 x 15 response with the reference placement (round-robin tmpVector, then
// column-wise slicing) and the number of group visits. Cases: the 193-RO
// configuration of ten 18-RO groups (53 bits) and one 13-RO group (33 bits),
// which overfills the 555-bit response; groups of 14 ROs (37 bits each, one
// bit per block); too few groups (short response); random group sizes.
module skip_mode_mapper_tb;
  import caecc_ref_pkg::*;

  localparam int NBLK = 37;
  logic clk = 0, rst_n = 0, grp_we = 0, start = 0, busy, done, short_resp;
  logic [6:0] grp_idx = '0, ngroups = '0;
  logic [52:0] grp_code = '0;
  logic [5:0] grp_bits = '0;
  logic [15:0] placed, visits;
  logic [0:14] resp [NBLK];
  int checks = 0, failures = 0;

  skip_mode_mapper dut (.clk, .rst_n, .grp_we, .grp_idx, .grp_code, .grp_bits, .start,
                        .ngroups, .busy, .done, .short_resp, .placed, .visits, .resp);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(string name, int ng, int sizes[64]);
    longint unsigned code [64];
    int nbits [64];
    bit exp[];
    int nvis, total, bad;
    total = 0;
    for (int g = 0; g < ng; g++) begin
      nbits[g] = ref_csc_bits(sizes[g]);
      code[g]  = {$urandom, $urandom} & ((64'd1 << nbits[g]) - 1);
      total += nbits[g];
      grp_we = 1; grp_idx = 7'(g); grp_code = 53'(code[g]); grp_bits = 6'(nbits[g]);
      @(posedge clk); #1;
    end
    grp_we = 0;
    ngroups = 7'(ng); start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) @(posedge clk);
    #1;
    ref_skip(ng, code, nbits, NBLK, exp, nvis);
    bad = 0;
    for (int b = 0; b < NBLK; b++)
      for (int j = 0; j < 15; j++)
        if (resp[b][j] !== exp[b * 15 + j]) bad++;
    checks += 4;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d response bits differ", name, bad); end
    if (int'(visits) != nvis) begin failures++; $display("FAIL %s: visits %0d expected %0d", name, visits, nvis); end
    if (short_resp != (total < NBLK * 15)) begin failures++; $display("FAIL %s: short flag", name); end
    if (int'(placed) != ((total < NBLK * 15) ? total : NBLK * 15)) begin
      failures++; $display("FAIL %s: placed %0d", name, placed);
    end
    $display("%s: %0d groups, %0d group bits, %0d placed, %0d visits", name, ng, total, placed, visits);
  endtask

  initial begin
    int sizes [64];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int g = 0; g < 64; g++) sizes[g] = 18;
    sizes[10] = 13;
    run_case("193 ROs", 11, sizes);
    for (int g = 0; g < 64; g++) sizes[g] = 14;
    run_case("14-RO groups", 15, sizes);
    // 14-RO groups give exactly 37 bits: each group is one column, one bit per block
    checks++;
    if (visits != 15) begin failures++; $display("FAIL 14-RO visit count"); end
    for (int g = 0; g < 64; g++) sizes[g] = 10;
    run_case("short", 20, sizes);
    for (int t = 0; t < 20; t++) begin
      for (int g = 0; g < 64; g++) sizes[g] = $urandom_range(18, 2);
      run_case("random", $urandom_range(64, 1), sizes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
