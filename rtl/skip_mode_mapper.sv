// skip_mode_mapper: skip-mode placement of CSC group bits into ECC blocks.
//
// Adjacent-rank flips inside one RO group tend to flip several bits of that
// group's CSC code. Skip mode spreads each group's bits over different ECC
// blocks so that such a flip costs at most a few bits per 15-bit block.
// The placement follows the skip-mode pseudo-code:
//   * Build tmpVector: visit the groups round-robin; on each visit a group
//     contributes its next min(NBLK, bits left) bits (most significant CSC bit
//     first); finished groups are skipped.
//   * Map blocks: consecutive NBLK-bit slices of tmpVector fill bit column
//     0, 1, ..., N-1 of the response, one bit per block; so tmpVector bit p goes
//     to block p % NBLK, bit position p / NBLK.
// The hardware does this one bit per clock: a block counter and a column
// counter replace the division. Placement stops when all NBLK*N response bits
// are filled; extra group bits are dropped; if the groups run out first the
// remaining response bits are zero and `short_resp` is set.
//
// Interface: while idle, write each group's CSC code and bit count with
// `grp_we` (address `grp_idx`); then, in a later cycle than the last write,
// pulse `start` with `ngroups`. `done` pulses
// when placement ends, `resp` is valid from then until the next start. One
// cycle per placed bit plus one per group visit. MAX_GROUPS is this design's
// choice; NBLK and N follow the 256-bit key example with the (15,7,5) code.
module skip_mode_mapper
  import caecc_pkg::*;
#(
  parameter int unsigned MAX_GROUPS = 64,
  parameter int unsigned NBLK       = NBLOCKS,
  parameter int unsigned N          = CA_N,
  localparam int unsigned GW        = $clog2(MAX_GROUPS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // group storage write port
  input  logic                grp_we,
  input  logic [GW-1:0]       grp_idx,
  input  logic [CSC_W-1:0]    grp_code,
  input  logic [5:0]          grp_bits,
  // control
  input  logic                start,
  input  logic [GW-1:0]       ngroups,
  output logic                busy,
  output logic                done,
  output logic                short_resp,
  output logic [15:0]         placed,         // number of response bits filled
  output logic [15:0]         visits,         // group visits with a non-empty chunk
  output logic [0:N-1]        resp [NBLK]     // resp[block][bit]
);

  localparam int unsigned IW = (MAX_GROUPS > 1) ? $clog2(MAX_GROUPS) : 1;
  localparam int unsigned BW = $clog2(NBLK);
  localparam int unsigned CW = $clog2(N);

  typedef enum logic [1:0] {S_IDLE, S_VISIT, S_EMIT} state_e;

  logic [CSC_W-1:0] code_mem [MAX_GROUPS];
  logic [5:0]       rem      [MAX_GROUPS];   // bits of each group not yet placed

  state_e        state;
  logic [GW-1:0] gi;
  logic [GW-1:0] ng_q;
  logic [5:0]    step_left;
  logic [BW-1:0] row;
  logic [CW-1:0] col;
  logic [15:0]   bits_left;                  // sum of rem[]
  logic          last_bit;
  logic          grp_done_bit;

  logic [15:0]   rem_sum;                    // bits of the first ngroups groups

  always_comb begin
    rem_sum = '0;
    for (int g = 0; g < MAX_GROUPS; g++) begin
      if (g < int'(ngroups)) rem_sum = rem_sum + 16'(rem[g]);
    end
  end

  logic [IW-1:0] gx, wx;                     // storage indices
  assign gx = IW'(gi);
  assign wx = IW'(grp_idx);

  assign busy         = (state != S_IDLE);
  assign last_bit     = (row == BW'(NBLK - 1)) && (col == CW'(N - 1));
  assign grp_done_bit = code_mem[gx][rem[gx] - 6'd1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      short_resp <= 1'b0;
      placed     <= '0;
      visits     <= '0;
      gi         <= '0;
      ng_q       <= '0;
      step_left  <= '0;
      row        <= '0;
      col        <= '0;
      bits_left  <= '0;
      for (int g = 0; g < MAX_GROUPS; g++) begin
        code_mem[g] <= '0;
        rem[g]      <= '0;
      end
      for (int b = 0; b < NBLK; b++) resp[b] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (grp_we && grp_idx < GW'(MAX_GROUPS)) begin
            code_mem[wx] <= grp_code;
            rem[wx]      <= (grp_bits > 6'(CSC_W)) ? 6'(CSC_W) : grp_bits;
          end
          if (start) begin
            for (int b = 0; b < NBLK; b++) resp[b] <= '0;
            bits_left <= rem_sum;
            for (int g = 0; g < MAX_GROUPS; g++) begin
              if (g >= int'(ngroups)) rem[g] <= '0;
            end
            ng_q       <= ngroups;
            gi         <= '0;
            row        <= '0;
            col        <= '0;
            placed     <= '0;
            visits     <= '0;
            short_resp <= 1'b0;
            state      <= S_VISIT;
          end
        end
        S_VISIT: begin
          if (bits_left == '0 || ng_q == '0) begin
            short_resp <= 1'b1;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else if (rem[gx] == '0) begin
            gi <= (gi == ng_q - GW'(1)) ? '0 : gi + GW'(1);
          end else begin
            step_left <= (rem[gx] > 6'(NBLK)) ? 6'(NBLK) : rem[gx];
            visits    <= visits + 16'd1;
            state     <= S_EMIT;
          end
        end
        S_EMIT: begin
          resp[row][col] <= grp_done_bit;
          rem[gx]        <= rem[gx] - 6'd1;
          bits_left      <= bits_left - 16'd1;
          step_left      <= step_left - 6'd1;
          placed         <= placed + 16'd1;
          if (row == BW'(NBLK - 1)) begin
            row <= '0;
            col <= col + CW'(1);
          end else begin
            row <= row + BW'(1);
          end
          if (last_bit) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (step_left == 6'd1) begin
            gi    <= (gi == ng_q - GW'(1)) ? '0 : gi + GW'(1);
            state <= S_VISIT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // group writes must precede start (rem_sum reads the stored bit counts)
  a_we_start: assert property (@(posedge clk) disable iff (!rst_n) !(start && grp_we));

endmodule
