// caecc_encoder: (15,7,5) CA-ECC check-bit generator.
//
// An FSM runs the 7-cell CA (kcell_ca) through one 'init' cycle, which latches
// the information vector m, and three 'work' cycles, after which the CA holds
// Tk^3 * m and the combinational g(Q) block (gq_logic) yields the 8 check bits
// cb = T * m. The FSM gates the CA with its clock enable only in init and work.
//
// Interface: pulse `start` with `m` valid (accepted when `busy` is low); the
// start cycle is the 'init' cycle, in which the CA latches `m`. Three 'work'
// cycles follow, so `done` is high for one cycle after the third clock edge
// following the start edge (4 cycles in all), with `cb` valid; `cb` stays valid
// until the next start. Active-low synchronous reset clears the CA.
module caecc_encoder
  import caecc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  info_t m,
  output logic  busy,
  output logic  done,
  output chk_t  cb,
  output info_t q        // CA state, brought out for observation
);

  typedef enum logic {S_IDLE, S_WORK} state_e;

  state_e     state;
  logic [1:0] work_cnt;
  logic       ce, load;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      work_cnt <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin        // 'init' cycle: CA latches m
          work_cnt <= '0;
          state    <= S_WORK;
        end
        S_WORK: begin
          work_cnt <= work_cnt + 2'd1;
          if (work_cnt == 2'(CA_WORK_CYCLES - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign ce   = (state == S_IDLE && start) || (state == S_WORK);
  assign load = (state == S_IDLE);

  kcell_ca u_ca (.clk, .rst_n, .ce, .load, .d(m), .q);
  gq_logic u_gq (.q, .cb);

endmodule
