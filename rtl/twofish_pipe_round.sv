// twofish_pipe_round -- one Twofish round with STAGES inner pipeline registers, the
// building block of the fully pipelined Twofish unit.
//
// Position POS (1..16) computes encryption round POS-1 or decryption round 16-POS,
// chosen by the direction bit that travels with each block.  Stage 1 registers the two
// g function outputs (key-dependent S-boxes and MDS multiplication; g(R0), g(R1 <<< 8)
// when encrypting, g(R2), g(R3 <<< 8) when decrypting, one shared pair) together with the
// four words; stage 2 registers the rest of the round (pseudo-Hadamard transform, subkey
// addition, XOR and 1-bit rotations).  Stages 3..STAGES are further registers on the
// round output, meant for register retiming into the g functions in synthesis; the
// document does not say where inside a round its registers sit.  All registers advance
// only when `en` is high.
//
//   key_enc_0/1 = K[2(POS-1)+8], K[2(POS-1)+9];  key_dec_0/1 = K[2(16-POS)+8], K[2(16-POS)+9]
//   sbox_key0/1 = S0, S1
//
// The default of 23 inner stages is derived from the document's reported throughput and
// latency; the placement of the registers is this design's choice.
module twofish_pipe_round
  import twofish_pkg::*;
#(
  parameter int unsigned POS    = 1,
  parameter int unsigned STAGES = 23
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  in_valid,
  input  logic  in_mode,
  input  regs_t in_state,
  input  word_t key_enc_0,
  input  word_t key_enc_1,
  input  word_t key_dec_0,
  input  word_t key_dec_1,
  input  word_t sbox_key0,
  input  word_t sbox_key1,
  output logic  out_valid,
  output logic  out_mode,
  output regs_t out_state
);

  if (STAGES < 2) begin : g_bad_stages
    $error("twofish_pipe_round needs at least 2 inner stages");
  end
  if (POS < 1 || POS > ROUNDS) begin : g_bad_pos
    $error("twofish_pipe_round position must be 1..16");
  end

  regs_t st_q [1:STAGES];
  logic  v_q  [1:STAGES];
  logic  m_q  [1:STAGES];
  word_t t0_q, t1_q;
  word_t f0, f1;
  regs_t st_round;

  always_comb begin
    regs_t x;
    x  = st_q[1];
    f0 = t0_q + t1_q + (m_q[1] ? key_dec_0 : key_enc_0);
    f1 = t0_q + (t1_q << 1) + (m_q[1] ? key_dec_1 : key_enc_1);
    if (!m_q[1]) st_round = '{ror(x.r2 ^ f0, 1), rol(x.r3, 1) ^ f1, x.r0, x.r1};
    else         st_round = '{x.r2, x.r3, rol(x.r0, 1) ^ f0, ror(x.r1 ^ f1, 1)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= STAGES; s++) begin
        st_q[s] <= '0;
        v_q[s]  <= 1'b0;
        m_q[s]  <= 1'b0;
      end
      t0_q <= '0;
      t1_q <= '0;
    end else if (en) begin
      t0_q    <= h_fun(in_mode ? in_state.r2 : in_state.r0, sbox_key0, sbox_key1);
      t1_q    <= h_fun(rol(in_mode ? in_state.r3 : in_state.r1, 8), sbox_key0, sbox_key1);
      st_q[1] <= in_state;
      v_q[1]  <= in_valid;
      m_q[1]  <= in_mode;
      st_q[2] <= st_round;
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
