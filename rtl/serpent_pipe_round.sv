// serpent_pipe_round -- one regular Serpent round with STAGES inner pipeline registers,
// the building block of the fully pipelined Serpent unit.
//
// Position POS (1..32) computes encryption round POS-1 or decryption of round 32-POS,
// chosen by the direction bit that travels with each block.  Stage 1 registers the key
// mixing and S-box layer (encryption) or the inverse linear transformation and inverse
// S-box layer (decryption); stage 2 registers the linear transformation (or, in round 31,
// the addition of K32) for encryption and the key mixing for decryption.  Stages
// 3..STAGES are further registers on the round output, meant for register retiming in
// synthesis; the document does not say where inside a round its registers sit.  All
// registers advance only when `en` is high.  Latency: STAGES enabled cycles.
//
//   key_enc = K(POS-1), key_dec = K(32-POS), key_last = K32
//
// The default of 3 inner stages is derived from the document's reported throughput and
// latency; the placement of the registers is this design's choice.
module serpent_pipe_round
  import serpent_pkg::*;
#(
  parameter int unsigned POS    = 1,
  parameter int unsigned STAGES = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  logic   in_mode,
  input  words_t in_state,
  input  words_t key_enc,
  input  words_t key_dec,
  input  words_t key_last,
  output logic   out_valid,
  output logic   out_mode,
  output words_t out_state
);

  if (STAGES < 2) begin : g_bad_stages
    $error("serpent_pipe_round needs at least 2 inner stages");
  end

  localparam int unsigned RE = POS - 1;          // encryption round
  localparam int unsigned RD = ROUNDS - POS;     // decryption round

  words_t first;
  words_t st_q [1:STAGES];
  logic   v_q  [1:STAGES];
  logic   m_q  [1:STAGES];

  always_comb begin
    if (!in_mode) first = sbox_layer(in_state ^ key_enc, RE, 1'b0);
    else          first = sbox_layer((RD == ROUNDS - 1) ? in_state : lin_inv(in_state), RD, 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= STAGES; s++) begin
        st_q[s] <= '0;
        v_q[s]  <= 1'b0;
        m_q[s]  <= 1'b0;
      end
    end else if (en) begin
      st_q[1] <= first;
      v_q[1]  <= in_valid;
      m_q[1]  <= in_mode;
      if (!m_q[1]) st_q[2] <= (RE == ROUNDS - 1) ? (st_q[1] ^ key_last) : lin(st_q[1]);
      else         st_q[2] <= st_q[1] ^ key_dec;
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
