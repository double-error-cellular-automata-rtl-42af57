// caecc_ber_tb: success rate of the (15,7,5) CA-ECC decoder against random
// bit errors. For bit-error rates of 1% to 10% it enrolls 1000 random
// information messages (helper h = c xor T*m), flips each of the 15 bits with
// the given probability, decodes and counts the messages recovered exactly.
// Expected: every message with at most two errors is recovered, and at 1% BER
// the success rate is at least 99%.
module caecc_ber_tb;
  import caecc_ref_pkg::*;

  localparam int MSGS = 1000;
  logic clk = 0, rst_n = 0, start = 0, busy, done, unc;
  logic [0:6] m_in = '0, saug, m_corr, ca_q;
  logic [0:7] c_in = '0, h_in = '0, syn;
  logic [0:14] e;
  int checks = 0, failures = 0;

  caecc_decoder dut (.clk, .rst_n, .start, .m_in, .c_in, .h_in, .busy, .done,
                     .syn, .saug, .e, .m_corr, .uncorrectable(unc), .ca_q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [0:6] m;
    logic [0:7] c;
    logic [0:14] err;
    int ok, n_le2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int ber = 1; ber <= 10; ber++) begin
      ok = 0; n_le2 = 0;
      for (int t = 0; t < MSGS; t++) begin
        m = 7'($urandom); c = 8'($urandom);
        for (int i = 0; i < 15; i++) err[i] = ($urandom_range(99) < ber);
        m_in = m ^ err[0:6]; c_in = c ^ err[7:14]; h_in = c ^ ref_cb(m); start = 1;
        @(posedge clk); #1 start = 0;
        while (!done) begin @(posedge clk); #1; end
        if (m_corr === m) ok++;
        if ($countones(err) <= 2) begin
          n_le2++;
          checks++;
          if (m_corr !== m) begin failures++; $display("FAIL correctable pattern %b", err); end
        end
      end
      $display("BER %0d%%: %0d of %0d messages recovered (%0d had <= 2 errors)", ber, ok, MSGS, n_le2);
      if (ber == 1) begin
        checks++;
        if (ok < MSGS * 99 / 100) begin failures++; $display("FAIL success rate at 1%% BER"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
