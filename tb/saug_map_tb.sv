// saug_map_tb: enumerates all error vectors of weight 0, 1 and 2, checks that
// their syndromes are distinct (minimum distance 5) and that SaugMap returns the
// information part of each one with hit = 1; every other syndrome must give
// hit = 0. Also checks the example syndrome 01110110 -> Saug 0000100.
module saug_map_tb;
  import caecc_ref_pkg::*;

  logic [0:7] s;
  logic [0:6] saug;
  logic hit;
  int checks = 0, failures = 0, npat = 0;
  bit used [256];

  saug_map dut (.s, .saug, .hit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (used[i]) used[i] = 0;
    // a == b == 15: no error; b == 15: one error at a; otherwise errors at a, b
    for (int a = 0; a <= 15; a++) begin
      for (int b = a; b <= 15; b++) begin
        logic [0:14] ep;
        logic [0:7] syn;
        if (a == b && a != 15) continue;
        ep = '0;
        if (a < 15) ep[a] = 1;
        if (b < 15) ep[b] = 1;
        syn = ref_cb(ep[0:6]) ^ ep[7:14];
        npat++;
        checks++;
        if (used[syn]) begin failures++; $display("FAIL syndrome %b not unique", syn); end
        used[syn] = 1;
        s = syn; #1;
        checks++;
        if (!hit || saug !== ep[0:6]) begin
          failures++; $display("FAIL ep=%b s=%b saug=%b hit=%b", ep, s, saug, hit);
        end
      end
    end
    checks++;
    if (npat != 121) begin failures++; $display("FAIL %0d patterns", npat); end
    for (int i = 0; i < 256; i++) begin
      if (!used[i]) begin
        s = 8'(i); #1;
        checks++;
        if (hit) begin failures++; $display("FAIL s=%b should miss", s); end
      end
    end
    s = 8'b01110110; #1;
    checks++;
    if (saug !== 7'b0000100) begin failures++; $display("FAIL example saug=%b", saug); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
