// caecc_decoder: (15,7,5) double-error-correcting CA-ECC decoder with
// code-offset helper data.
//
// Reconstruction of one 15-bit PUF response block r' = [m' | c']:
//   w' = [m' | h ^ c']             (helper data h removes the check-bit offset)
//   S  = T * m' ^ (h ^ c')          T * m' comes from the CA encoder (4 cycles)
//   Saug = SaugMap(S)
//   E  = Taug^-1 * (S | Saug)       15-bit error vector
//   m  = m' ^ E[0:6]                corrected information bits
// Timing: `start` samples m', c' and h. The embedded encoder takes 4 cycles
// (1 init + 3 work); three register stages follow (S, Saug, E), so `done`
// rises after the 7th clock edge counting the start edge, with `e`, `m_corr` and
// `uncorrectable` valid; they hold until the next start. The placement of the
// three register stages is this design's choice. `uncorrectable` is high when
// the syndrome matches no error vector of weight 0..2 (an addition).
module caecc_decoder
  import caecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  info_t m_in,     // m' : information bits of the new PUF reading
  input  chk_t  c_in,     // c' : check-position bits of the new PUF reading
  input  chk_t  h_in,     // h  : helper data of this block
  output logic  busy,
  output logic  done,
  output chk_t  syn,      // S
  output info_t saug,     // Saug
  output code_t e,        // E
  output info_t m_corr,   // corrected information bits
  output logic  uncorrectable,
  output info_t ca_q      // state of the encoder's k-cell CA (observation)
);

  info_t m_q;
  chk_t  w_chk_q;
  logic  enc_done, enc_busy;
  chk_t  enc_cb;
  logic  st_s, st_saug;
  chk_t  syn_d;
  info_t saug_c;
  logic  hit_c, hit_q;
  code_t e_c;

  caecc_encoder u_enc (
    .clk, .rst_n, .start(start && !busy), .m(m_in),
    .busy(enc_busy), .done(enc_done), .cb(enc_cb), .q(ca_q)
  );

  saug_map u_map (.s(syn), .saug(saug_c), .hit(hit_c));
  taug_inv u_inv (.s(syn_d), .saug, .e(e_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_q <= '0; w_chk_q <= '0;
      syn <= '0; syn_d <= '0; saug <= '0; hit_q <= 1'b0;
      e <= '0; m_corr <= '0; uncorrectable <= 1'b0;
      st_s <= 1'b0; st_saug <= 1'b0; done <= 1'b0;
    end else begin
      if (start && !busy) begin
        m_q     <= m_in;
        w_chk_q <= h_in ^ c_in;
      end
      // stage 5: syndrome
      st_s <= enc_done;
      if (enc_done) syn <= enc_cb ^ w_chk_q;
      // stage 6: SaugMap
      st_saug <= st_s;
      if (st_s) begin
        saug  <= saug_c;
        hit_q <= hit_c;
        syn_d <= syn;
      end
      // stage 7: Taug^-1 and correction
      done <= st_saug;
      if (st_saug) begin
        e             <= e_c;
        m_corr        <= m_q ^ saug;
        uncorrectable <= !hit_q;
      end
    end
  end

  assign busy = enc_busy || enc_done || st_s || st_saug;

  // a new block may only start once the previous one has left the pipeline
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
