// csc_encoder_tb: encodes random RO groups of 0..18 oscillators (random
// counts, with deliberate ties) and compares the code with the reference
// sum of inv_i * (i-1)!, the bit count with ceil(log2(g!)) and the latency
// (g-1 clock edges after the start edge). Also checks that the all-ascending
// order gives the maximum code g!-1 and the all-descending order gives 0.
module csc_encoder_tb;
  import caecc_ref_pkg::*;

  localparam int FW = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [4:0] size = '0;
  logic [FW-1:0] freq [18];
  logic [52:0] code;
  logic [5:0] nbits;
  int checks = 0, failures = 0;

  csc_encoder #(.FW(FW)) dut (.clk, .rst_n, .start, .size, .freq, .busy, .done, .code, .nbits);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int g, int unsigned f[18]);
    int cyc = 0;
    longint unsigned exp;
    size = 5'(g);
    foreach (freq[i]) freq[i] = FW'(f[i]);
    start = 1;
    @(posedge clk); #1 start = 0;
    foreach (freq[i]) freq[i] = FW'($urandom);   // inputs are sampled only at start
    while (!done) begin @(posedge clk); #1 cyc++; end
    exp = ref_csc(g, f);
    checks += 3;
    if (code !== 53'(exp)) begin
      failures++; $display("FAIL g=%0d code=%0d expected %0d", g, code, exp);
    end
    if (int'(nbits) != ref_csc_bits(g)) begin
      failures++; $display("FAIL g=%0d nbits=%0d", g, nbits);
    end
    if (cyc != ((g < 2) ? 0 : g - 1)) begin
      failures++; $display("FAIL g=%0d latency %0d", g, cyc);
    end
  endtask

  initial begin
    int unsigned f [18];
    longint unsigned fact;
    foreach (freq[i]) freq[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ascending counts: every later RO is faster -> code 0
    for (int g = 2; g <= 18; g++) begin
      for (int i = 0; i < 18; i++) f[i] = 1000 + i;
      run(g, f);
      checks++;
      if (code != 0) begin failures++; $display("FAIL ascending g=%0d code=%0d", g, code); end
      // descending counts: all inversions -> g! - 1
      for (int i = 0; i < 18; i++) f[i] = 1000 - i;
      run(g, f);
      fact = 1;
      for (int i = 2; i <= g; i++) fact *= longint'(i);
      checks++;
      if (code != 53'(fact - 1)) begin failures++; $display("FAIL descending g=%0d code=%0d", g, code); end
    end
    for (int t = 0; t < 500; t++) begin
      int g;
      g = $urandom_range(18);
      for (int i = 0; i < 18; i++) f[i] = (t % 3 == 0) ? $urandom_range(20) : $urandom_range(65535);
      run(g, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
