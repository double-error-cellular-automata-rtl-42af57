// puf_keygen: RO-PUF key generator with skip-mode CSC and (15,7,5) CA-ECC.
//
// Data path, for a 256-bit key:
//   1. RO groups arrive one at a time as frequency counts (grouping and
//      systematic-variation removal happen upstream). csc_encoder turns each
//      group's rank order into ceil(log2(g!)) bits.
//   2. skip_mode_mapper spreads the group bits over 37 blocks of 15 bits
//      (555 response bits): block b = [m (7 bits) | c (8 bits)].
//   3. Enrollment (mode = 1, code-offset construction): for each block the
//      CA-ECC encoder gives cb = T*m and the helper word h = c ^ cb is written
//      to the external nonvolatile memory; the key is the 37*7 = 259 m bits,
//      of which the first 256 are output.
//   4. Reconstruction (mode = 0): for each block h is read back and
//      caecc_decoder corrects up to two errors per block; the corrected m
//      bits form the key.
// Interfaces:
//   * group stream: grp_valid/grp_ready handshake with grp_size (2..18),
//     grp_freq (RO_1 first) and grp_last on the final group of a session.
//   * helper memory: nvm_we writes nvm_wdata to word nvm_addr; nvm_re requests
//     word nvm_addr, whose value must be on nvm_rdata in the next cycle.
//   * key_valid rises when all 37 blocks are processed and holds, with key and
//     the statistics, until the next group is accepted.
// `mode` is sampled when the first group of a session is accepted. One block
// takes 5 cycles to enroll and 9 to reconstruct; CSC takes g-1 cycles per group
// and placement one cycle per response bit plus one per group visit.
// Helper memory timing, the group stream and the statistics outputs are this
// design's choices.
module puf_keygen
  import caecc_pkg::*;
#(
  parameter int unsigned FW         = 16,   // RO frequency count width
  parameter int unsigned MAX_GROUPS = 64,   // groups per response
  localparam int unsigned GW        = $clog2(MAX_GROUPS + 1),
  localparam int unsigned AW        = $clog2(NBLOCKS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mode,           // 1: enroll, 0: reconstruct
  // RO group stream
  input  logic                grp_valid,
  output logic                grp_ready,
  input  logic [4:0]          grp_size,
  input  logic [FW-1:0]       grp_freq [MAX_RO],
  input  logic                grp_last,
  // helper data memory
  output logic                nvm_we,
  output logic                nvm_re,
  output logic [AW-1:0]       nvm_addr,
  output chk_t                nvm_wdata,
  input  chk_t                nvm_rdata,
  // key and statistics
  output logic                key_valid,
  output logic [0:KEY_BITS-1] key,
  output logic [15:0]         corrected_bits,  // bit errors corrected since the last key
  output logic [7:0]          corrected_blocks,// blocks with a nonzero error vector
  output logic [7:0]          double_blocks,   // blocks with two corrected errors
  output logic [7:0]          fail_blocks,     // blocks with an uncorrectable syndrome
  output logic                short_resp,      // groups gave fewer than 555 bits
  output logic [15:0]         skip_visits      // group chunks placed by skip mode
);

  typedef enum logic [3:0] {
    S_GRP, S_CSC, S_MAPGO, S_MAP, S_BLK, S_ENC, S_RD, S_DEC, S_DONE
  } state_e;

  state_e        state;
  logic          mode_q;
  logic          last_q;
  logic [GW-1:0] gcount;
  logic [AW-1:0] blk;
  logic [0:NBLOCKS*CA_K-1] info_bits;

  // CSC
  logic             csc_start, csc_busy, csc_done;
  logic [CSC_W-1:0] csc_code;
  logic [5:0]       csc_nbits;
  // mapper
  logic             map_start, map_busy, map_done, map_short;
  logic [15:0]      map_placed, map_visits;
  logic [0:CA_N-1]  resp [NBLOCKS];
  // encoder
  logic             enc_start, enc_busy, enc_done;
  chk_t             enc_cb;
  info_t            enc_q;
  // decoder
  logic             dec_start, dec_busy, dec_done, dec_unc;
  chk_t             dec_syn;
  info_t            dec_saug, dec_m, dec_q;
  code_t            dec_e;

  info_t cur_m;
  chk_t  cur_c;
  assign cur_m = resp[blk][0:CA_K-1];
  assign cur_c = resp[blk][CA_K:CA_N-1];

  assign grp_ready = (state == S_GRP) && !csc_busy;
  assign csc_start = grp_valid && grp_ready;
  assign map_start = (state == S_MAPGO);   // one cycle after the last group write
  assign enc_start = (state == S_BLK) && mode_q;
  assign dec_start = (state == S_RD);

  // helper memory port: write on encoder completion, read one cycle ahead of
  // the decoder start
  assign nvm_we    = (state == S_ENC) && enc_done;
  assign nvm_re    = (state == S_BLK) && !mode_q;
  assign nvm_addr  = blk;
  assign nvm_wdata = cur_c ^ enc_cb;

  csc_encoder #(.FW(FW)) u_csc (
    .clk, .rst_n, .start(csc_start), .size(grp_size), .freq(grp_freq),
    .busy(csc_busy), .done(csc_done), .code(csc_code), .nbits(csc_nbits)
  );

  skip_mode_mapper #(.MAX_GROUPS(MAX_GROUPS)) u_map (
    .clk, .rst_n,
    .grp_we(csc_done), .grp_idx(gcount), .grp_code(csc_code), .grp_bits(csc_nbits),
    .start(map_start), .ngroups(gcount),
    .busy(map_busy), .done(map_done), .short_resp(map_short),
    .placed(map_placed), .visits(map_visits), .resp
  );

  caecc_encoder u_enc (
    .clk, .rst_n, .start(enc_start), .m(cur_m),
    .busy(enc_busy), .done(enc_done), .cb(enc_cb), .q(enc_q)
  );

  caecc_decoder u_dec (
    .clk, .rst_n, .start(dec_start), .m_in(cur_m), .c_in(cur_c), .h_in(nvm_rdata),
    .busy(dec_busy), .done(dec_done), .syn(dec_syn), .saug(dec_saug), .e(dec_e),
    .m_corr(dec_m), .uncorrectable(dec_unc), .ca_q(dec_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state            <= S_GRP;
      mode_q           <= 1'b0;
      last_q           <= 1'b0;
      gcount           <= '0;
      blk              <= '0;
      info_bits        <= '0;
      key_valid        <= 1'b0;
      corrected_bits   <= '0;
      corrected_blocks <= '0;
      double_blocks    <= '0;
      fail_blocks      <= '0;
      short_resp       <= 1'b0;
      skip_visits      <= '0;
    end else begin
      unique case (state)
        S_GRP: if (csc_start) begin
          if (key_valid) begin             // first group of a new session
            key_valid        <= 1'b0;
            gcount           <= '0;
            corrected_bits   <= '0;
            corrected_blocks <= '0;
            double_blocks    <= '0;
            fail_blocks      <= '0;
          end
          if (key_valid || gcount == '0) mode_q <= mode;
          last_q <= grp_last;
          state  <= S_CSC;
        end
        S_CSC: if (csc_done) begin
          if (last_q) begin
            gcount <= gcount + GW'(1);
            state  <= S_MAPGO;
          end else begin
            gcount <= gcount + GW'(1);
            state  <= S_GRP;
          end
        end
        S_MAPGO: state <= S_MAP;
        S_MAP: if (map_done) begin
          short_resp  <= map_short;
          skip_visits <= map_visits;
          blk         <= '0;
          state       <= S_BLK;
        end
        S_BLK: begin
          state <= mode_q ? S_ENC : S_RD;
        end
        S_ENC: if (enc_done) begin
          info_bits[int'(blk)*CA_K +: CA_K] <= cur_m;
          if (blk == AW'(NBLOCKS - 1)) state <= S_DONE;
          else begin
            blk   <= blk + AW'(1);
            state <= S_BLK;
          end
        end
        S_RD: state <= S_DEC;            // decoder samples nvm_rdata on entry
        S_DEC: if (dec_done) begin
          info_bits[int'(blk)*CA_K +: CA_K] <= dec_m;
          corrected_bits <= corrected_bits + 16'($countones(dec_e));
          if (dec_e != '0)             corrected_blocks <= corrected_blocks + 8'd1;
          if ($countones(dec_e) == 2)  double_blocks    <= double_blocks + 8'd1;
          if (dec_unc)                 fail_blocks      <= fail_blocks + 8'd1;
          if (blk == AW'(NBLOCKS - 1)) state <= S_DONE;
          else begin
            blk   <= blk + AW'(1);
            state <= S_BLK;
          end
        end
        S_DONE: begin
          key_valid <= 1'b1;
          gcount    <= '0;
          state     <= S_GRP;
        end
        default: state <= S_GRP;
      endcase
    end
  end

  assign key = info_bits[0:KEY_BITS-1];

  // helper memory is either written (enrollment) or read (reconstruction)
  a_nvm_excl: assert property (@(posedge clk) disable iff (!rst_n) !(nvm_we && nvm_re));
  // the group stream is only accepted while the CSC encoder is free
  a_grp_csc: assert property (@(posedge clk) disable iff (!rst_n) csc_start |-> !csc_busy);

endmodule
