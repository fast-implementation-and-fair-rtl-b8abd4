// rc6_pipelined -- RC6 encryption/decryption unit with full mixed inner- and outer-round
// pipelining, for non-feedback modes (ECB, counter mode).
//
// All 20 rounds are unrolled and each holds INNER_STAGES pipeline registers, so a new
// block may enter every clock cycle: throughput = 128 bits per clock period, latency =
// 20 * INNER_STAGES cycles.  Pre-whitening is applied on the way into the first round and
// post-whitening on the way out of the last, both chosen by the direction bit each block
// carries.  When the output cannot take a block (res_ready low), the whole pipeline holds.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt), one per cycle
//   keys                                   the 44 round key words S[0..43]
//   res_valid/res_ready/res_data/res_mode  block out
//
// The architecture follows the document; the default of 28 inner stages per round is
// derived from its reported throughput (13.1 Gbit/s) and latency (5490 ns); the direction
// bit per block and the shared pipeline hold are this design's choices.
module rc6_pipelined
  import rc6_pkg::*;
#(
  parameter int unsigned INNER_STAGES = 28
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   blk_valid,
  output logic   blk_ready,
  input  block_t blk_data,
  input  logic   blk_mode,
  input  word_t  keys [NWORDS],
  output logic   res_valid,
  input  logic   res_ready,
  output block_t res_data,
  output logic   res_mode
);

  logic  en;
  logic  v [R+1];
  logic  m [R+1];
  regs_t s [R+1];
  regs_t in_r, pre, post;

  assign en        = res_ready;
  assign blk_ready = en;

  always_comb begin
    in_r = unpack_block(blk_data);
    pre  = in_r;
    if (!blk_mode) begin
      pre.b = in_r.b + keys[0];
      pre.d = in_r.d + keys[1];
    end else begin
      pre.a = in_r.a - keys[2*R + 2];
      pre.c = in_r.c - keys[2*R + 3];
    end
    post = s[R];
    if (!m[R]) begin
      post.a = s[R].a + keys[2*R + 2];
      post.c = s[R].c + keys[2*R + 3];
    end else begin
      post.b = s[R].b - keys[0];
      post.d = s[R].d - keys[1];
    end
  end

  assign v[0] = blk_valid;
  assign m[0] = blk_mode;
  assign s[0] = pre;

  for (genvar p = 1; p <= R; p++) begin : g_round
    rc6_pipe_round #(.POS(p), .STAGES(INNER_STAGES)) u_round (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (en),
      .in_valid   (v[p-1]),
      .in_mode    (m[p-1]),
      .in_state   (s[p-1]),
      .key_enc_lo (keys[2*p]),
      .key_enc_hi (keys[2*p + 1]),
      .key_dec_lo (keys[2*(R + 1 - p)]),
      .key_dec_hi (keys[2*(R + 1 - p) + 1]),
      .out_valid  (v[p]),
      .out_mode   (m[p]),
      .out_state  (s[p])
    );
  end

  assign res_valid = v[R];
  assign res_mode  = m[R];
  assign res_data  = pack_block(post);

endmodule
