// serpent_pipelined -- Serpent encryption/decryption unit with full mixed inner- and
// outer-round pipelining, for non-feedback modes (ECB, counter mode).
//
// All 32 regular rounds are unrolled and each holds INNER_STAGES pipeline registers, so a
// new block may enter every clock cycle: throughput = 128 bits per clock period, latency
// = 32 * INNER_STAGES cycles.  Each block carries its direction bit; decryption blocks get
// K32 added at the input, and position p of the pipeline undoes round 32-p.  When the
// output cannot take a block (res_ready low), the whole pipeline holds.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt), one per cycle
//   keys                                   the 33 round keys K0..K32
//   res_valid/res_ready/res_data/res_mode  block out
//
// The architecture follows the document; the default of 3 inner stages per round is
// derived from its reported throughput (16.8 Gbit/s) and latency (733 ns); the direction
// bit per block and the shared pipeline hold are this design's choices.
module serpent_pipelined
  import serpent_pkg::*;
#(
  parameter int unsigned INNER_STAGES = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   blk_valid,
  output logic   blk_ready,
  input  block_t blk_data,
  input  logic   blk_mode,
  input  words_t keys [NKEYS],
  output logic   res_valid,
  input  logic   res_ready,
  output block_t res_data,
  output logic   res_mode
);

  logic   en;
  logic   v [ROUNDS+1];
  logic   m [ROUNDS+1];
  words_t s [ROUNDS+1];

  assign en        = res_ready;
  assign blk_ready = en;

  assign v[0] = blk_valid;
  assign m[0] = blk_mode;
  assign s[0] = from_block(blk_data) ^ (blk_mode ? keys[ROUNDS] : '0);

  for (genvar p = 1; p <= ROUNDS; p++) begin : g_round
    serpent_pipe_round #(.POS(p), .STAGES(INNER_STAGES)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .in_valid  (v[p-1]),
      .in_mode   (m[p-1]),
      .in_state  (s[p-1]),
      .key_enc   (keys[p-1]),
      .key_dec   (keys[ROUNDS-p]),
      .key_last  (keys[ROUNDS]),
      .out_valid (v[p]),
      .out_mode  (m[p]),
      .out_state (s[p])
    );
  end

  assign res_valid = v[ROUNDS];
  assign res_mode  = m[ROUNDS];
  assign res_data  = to_block(s[ROUNDS]);

endmodule
