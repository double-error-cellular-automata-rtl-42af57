// kcell_ca: the k-cell (k = 7) cellular automaton of the CA-ECC encoder.
//
// Each cell is a D flip-flop plus a next-state XOR of its left neighbour, itself
// and its right neighbour, selected per cell by caecc_pkg::CA_RULE; the boundary
// is periodic (cell 0 and cell 6 are neighbours). Following the encoder
// description, the flip-flops only load when the clock enable `ce` is high:
// with `load` high they latch the information vector `d` (the 'init' state),
// otherwise the next CA state (a 'work' cycle). An active-low synchronous reset
// clears every cell to zero. Timing: `q` changes one clock edge after `ce`.
// The rule vector itself is this design's choice (see caecc_pkg).
module kcell_ca
  import caecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ce,     // clock enable for init and work cycles
  input  logic  load,   // 1: latch d (init), 0: CA step (work)
  input  info_t d,
  output info_t q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (ce) q <= load ? d : ca_step(q);
  end

endmodule
