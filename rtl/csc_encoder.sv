// csc_encoder: compact syndrome coding (CSC) of one RO group.
//
// The rank order of the g ring oscillators of a group (g = 2..18) is mapped to
// an integer c in [0, g!-1], a mixed-radix (Lehmer) code, following the CSC
// encoding pseudo-code:
//   c = 0
//   for i = g downto 2:
//     inv = number of j in 1..i-1 with f(RO_i) <= f(RO_j)
//     c   = (c + inv) * (i - 1)
// One loop iteration is done per clock cycle: the i-1 comparisons run in
// parallel and the product with the small constant (i-1) is a 53 x 5 bit
// multiply. The group's bit count ceil(log2(g!)) is given on `nbits`.
//
// Interface: pulse `start` with `size` and `freq` (RO counts, index 0 = RO_1)
// while `busy` is low; they are sampled on that edge. `done` pulses g-1 clock
// edges later for g >= 2 (one edge for g < 2), with `code` and `nbits` valid
// until the next start. The count width FW is this design's choice.
module csc_encoder
  import caecc_pkg::*;
#(
  parameter int unsigned FW = 16      // width of one RO frequency count
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [4:0]                size,          // number of ROs in the group
  input  logic [FW-1:0]             freq [MAX_RO],
  output logic                      busy,
  output logic                      done,
  output logic [CSC_W-1:0]          code,
  output logic [5:0]                nbits
);

  logic [FW-1:0] f_q [MAX_RO];
  logic [4:0]    i_q;          // current i (1-based RO index)
  logic [4:0]    inv;

  // inversion count of RO_i against RO_1..RO_{i-1}
  always_comb begin
    inv = '0;
    for (int j = 0; j < MAX_RO; j++) begin
      if (j + 1 < int'(i_q) && f_q[i_q - 5'd1] <= f_q[j]) inv = inv + 5'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      code  <= '0;
      nbits <= '0;
      i_q   <= '0;
      for (int j = 0; j < MAX_RO; j++) f_q[j] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          f_q   <= freq;
          i_q   <= (size > 5'(MAX_RO)) ? 5'(MAX_RO) : size;
          nbits <= CSC_BITS_TAB[(size > 5'(MAX_RO)) ? 5'(MAX_RO) : size];
          code  <= '0;
          if (size < 5'd2) done <= 1'b1;
          else             busy <= 1'b1;
        end
      end else begin
        code <= (code + CSC_W'(inv)) * CSC_W'(i_q - 5'd1);
        i_q  <= i_q - 5'd1;
        if (i_q == 5'd2) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
