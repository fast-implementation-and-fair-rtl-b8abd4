// rc6_pipe_round -- one RC6 round with STAGES inner pipeline registers, the building
// block of the fully pipelined RC6 unit.
//
// Position POS (1..20) computes encryption round POS or decryption round 21-POS, chosen
// by the direction bit that travels with each block.  Stage 1 registers the two
// quadratic functions t and u (f(B), f(D) when encrypting, f(A), f(C) when decrypting,
// one pair of shared 32x32-bit multipliers) together with the four words; stage 2
// registers the rest of the round (XOR, data-dependent rotations, key addition or
// subtraction).  Stages 3..STAGES are further registers on the round output, meant for
// register retiming into the multipliers in synthesis; the document does not say where
// inside a round its registers sit.  All registers advance only when `en` is high.
//
//   key_enc_lo/hi = S[2 POS], S[2 POS + 1];  key_dec_lo/hi = S[2(21-POS)], S[2(21-POS)+1]
//
// The default of 28 inner stages is derived from the document's reported throughput and
// latency; the placement of the registers is this design's choice.
module rc6_pipe_round
  import rc6_pkg::*;
#(
  parameter int unsigned POS    = 1,
  parameter int unsigned STAGES = 28
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  logic  in_mode,
  input  regs_t in_state,
  input  word_t key_enc_lo,
  input  word_t key_enc_hi,
  input  word_t key_dec_lo,
  input  word_t key_dec_hi,
  output logic  out_valid,
  output logic  out_mode,
  output regs_t out_state
);

  if (STAGES < 2) begin : g_bad_stages
    $error("rc6_pipe_round needs at least 2 inner stages");
  end
  if (POS < 1 || POS > R) begin : g_bad_pos
    $error("rc6_pipe_round position must be 1..20");
  end

  regs_t st_q [1:STAGES];
  logic  v_q  [1:STAGES];
  logic  m_q  [1:STAGES];
  word_t t_q, u_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= STAGES; s++) begin
        st_q[s] <= '0;
        v_q[s]  <= 1'b0;
        m_q[s]  <= 1'b0;
      end
      t_q <= '0;
      u_q <= '0;
    end else if (en) begin
      t_q     <= quad(in_mode ? in_state.a : in_state.b);
      u_q     <= quad(in_mode ? in_state.c : in_state.d);
      st_q[1] <= in_state;
      v_q[1]  <= in_valid;
      m_q[1]  <= in_mode;
      st_q[2] <= m_q[1] ? round_inv(st_q[1], t_q, u_q, key_dec_lo, key_dec_hi)
                        : round_fwd(st_q[1], t_q, u_q, key_enc_lo, key_enc_hi);
      v_q[2]  <= v_q[1];
      m_q[2]  <= m_q[1];
      for (int s = 3; s <= STAGES; s++) begin
        st_q[s] <= st_q[s-1];
        v_q[s]  <= v_q[s-1];
        m_q[s]  <= m_q[s-1];
      end
    end
  end

  assign out_valid = v_q[STAGES];
  assign out_mode  = m_q[STAGES];
  assign out_state = st_q[STAGES];

endmodule
