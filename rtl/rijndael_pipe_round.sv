// rijndael_pipe_round -- one Rijndael round with STAGES inner pipeline registers, the
// building block of the fully pipelined unit (mixed inner- and outer-round pipelining).
//
// Stage 1 is the S-box memory: its registered read is the first pipeline register.
// Stage 2 registers the rest of the round (ShiftRows, MixColumns and AddRoundKey, or their
// inverses).  Stages 3..STAGES are further registers on the round output; the document
// does not say where inside a round its registers sit, and these extra ones are meant to be
// moved into the round logic by register retiming in synthesis.  A block's direction and
// valid bit travel with it, so encryption and decryption blocks may be mixed freely.
// Every register advances only when `en` is high.  Latency: STAGES enabled cycles.
//
//   ROUND                 position of this round, 1..10 (round 10 has no MixColumns)
//   key_enc / key_dec     round key ROUND (encryption) and 10-ROUND (decryption)
//
// Repeating a round with k inner registers follows the document; the default of 7 inner
// stages is derived from its reported throughput and latency; the placement of the
// registers is this design's choice.
module rijndael_pipe_round
  import rijndael_pkg::*;
#(
  parameter int unsigned ROUND  = 1,
  parameter int unsigned STAGES = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   in_valid,
  input  logic   in_mode,
  input  block_t in_state,
  input  block_t key_enc,
  input  block_t key_dec,
  output logic   out_valid,
  output logic   out_mode,
  output block_t out_state
);

  if (STAGES < 2) begin : g_bad_stages
    $error("rijndael_pipe_round needs at least 2 inner stages");
  end

  localparam bit LAST = (ROUND == NR);

  // Stage 1: S-box memory read.
  block_t subbed;
  logic   v1, m1;

  rijndael_sbox_layer #(.REGISTERED(1'b1)) u_sbox (
    .clk  (clk),
    .en   (en),
    .dec  (in_mode),
    .din  (in_state),
    .dout (subbed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      m1 <= 1'b0;
    end else if (en) begin
      v1 <= in_valid;
      m1 <= in_mode;
    end
  end

  // Stages 2..STAGES: round tail, then the remaining registers.
  block_t st_q [2:STAGES];
  logic   v_q  [2:STAGES];
  logic   m_q  [2:STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 2; s <= STAGES; s++) begin
        st_q[s] <= '0;
        v_q[s]  <= 1'b0;
        m_q[s]  <= 1'b0;
      end
    end else if (en) begin
      st_q[2] <= round_tail(subbed, m1 ? key_dec : key_enc, m1, LAST);
      v_q[2]  <= v1;
      m_q[2]  <= m1;
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
