// taug_inv_tb: checks E = Taug^-1 (S | Saug), i.e. E = [Saug | S ^ T*Saug],
// on the decoder example and on random inputs.
module taug_inv_tb;
  import caecc_ref_pkg::*;

  logic [0:7] s;
  logic [0:6] saug;
  logic [0:14] e;
  int checks = 0, failures = 0;

  taug_inv dut (.s, .saug, .e);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 8'b01110110; saug = 7'b0000100; #1;
    checks++;
    if (e !== 15'b000010000001000) begin failures++; $display("FAIL example e=%b", e); end
    for (int i = 0; i < 1000; i++) begin
      s = 8'($urandom); saug = 7'($urandom); #1;
      checks++;
      if (e !== {saug, s ^ ref_cb(saug)}) begin
        failures++; $display("FAIL s=%b saug=%b e=%b", s, saug, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
