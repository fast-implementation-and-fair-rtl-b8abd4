// rijndael_pipelined -- Rijndael (AES-128) encryption/decryption unit with full mixed
// inner- and outer-round pipelining, the architecture for non-feedback modes (ECB,
// counter mode).
//
// All 10 rounds are unrolled (outer-round pipelining) and each round holds INNER_STAGES
// pipeline registers (inner-round pipelining), so NR * INNER_STAGES blocks are in flight
// and a new block may enter every clock cycle: throughput = 128 bits per clock period,
// latency = NR * INNER_STAGES clock cycles, independent of how many rounds are unrolled.
// There is no feedback loop and no input multiplexer.  The whitening key is XORed in front
// of the first round's S-box memory.  Each block carries its own direction bit, so
// encryption and decryption blocks can follow each other in consecutive cycles; every round
// picks the encryption or the decryption round key by that bit.
//
// When the output cannot take a block (res_ready low), the whole pipeline holds: no block
// enters and none moves, so none is lost.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt), one per cycle
//   keys                                   the 11 round keys, from the key memory
//   res_valid/res_ready/res_data/res_mode  block out
//
// The architecture and the use of S-box memories follow the document; the default of 7
// inner stages per round is derived from its reported throughput (12.2 Gbit/s) and latency
// (737 ns); the shared pipeline hold is this design's choice.
module rijndael_pipelined
  import rijndael_pkg::*;
#(
  parameter int unsigned INNER_STAGES = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   blk_valid,
  output logic   blk_ready,
  input  block_t blk_data,
  input  logic   blk_mode,
  input  block_t keys [NKEYS],
  output logic   res_valid,
  input  logic   res_ready,
  output block_t res_data,
  output logic   res_mode
);

  logic   en;
  logic   v    [NR+1];
  logic   m    [NR+1];
  block_t s    [NR+1];

  assign en        = res_ready;
  assign blk_ready = en;

  assign v[0] = blk_valid;
  assign m[0] = blk_mode;
  assign s[0] = blk_data ^ (blk_mode ? keys[NR] : keys[0]);

  for (genvar r = 1; r <= NR; r++) begin : g_round
    rijndael_pipe_round #(.ROUND(r), .STAGES(INNER_STAGES)) u_round (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .in_valid  (v[r-1]),
      .in_mode   (m[r-1]),
      .in_state  (s[r-1]),
      .key_enc   (keys[r]),
      .key_dec   (keys[NR-r]),
      .out_valid (v[r]),
      .out_mode  (m[r]),
      .out_state (s[r])
    );
  end

  assign res_valid = v[NR];
  assign res_mode  = m[NR];
  assign res_data  = s[NR];

endmodule
