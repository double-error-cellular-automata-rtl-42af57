// gq_logic_tb: for every 7-bit information vector m, runs the reference CA three
// steps and checks that g(Q) of the result equals T * m; also checks the
// decoder example Q = 0010111 -> 10100011.
module gq_logic_tb;
  import caecc_ref_pkg::*;

  logic [0:6] q;
  logic [0:7] cb;
  int checks = 0, failures = 0;

  gq_logic dut (.q, .cb);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q = 7'b0010111; #1;
    checks++;
    if (cb !== 8'b10100011) begin failures++; $display("FAIL example cb=%b", cb); end
    for (int m = 0; m < 128; m++) begin
      q = ref_ca_step(ref_ca_step(ref_ca_step(7'(m)))); #1;
      checks++;
      if (cb !== ref_cb(7'(m))) begin
        failures++;
        $display("FAIL m=%b cb=%b expected %b", 7'(m), cb, ref_cb(7'(m)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
