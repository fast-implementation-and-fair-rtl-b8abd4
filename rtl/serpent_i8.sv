// serpent_i8 -- Serpent encryption/decryption unit in the basic iterative architecture
// "I8": eight regular cipher rounds form one implementation round, which is computed
// 4 times per block, one per clock cycle.
//
// The implementation round is combinational logic with eight regular rounds one after the
// other (round 8j+i uses key mixing with K(8j+i), 32 copies of S-box i and the linear
// transformation), between a 128-bit register and an input multiplexer.  In the last
// regular round of the block (round 31) the linear transformation is replaced by the
// addition of K32 on the output.  Decryption has its own implementation round (inverse
// linear transformation, inverse S-boxes, key mixing, rounds in descending order); K32 is
// added on the load path, and the keys of implementation round 3-c are used in cycle c.
// As in the other iterative units, the next block is loaded in the cycle of the last
// implementation round: one block per 4 cycles, latency 4 cycles.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt)
//   keys                                   the 33 round keys K0..K32 (words_t packing)
//   res_valid/res_ready/res_data/res_mode  block out; res_ready low stalls the last cycle
//
// The structure (8 rounds per implementation round, K32 at the
// output, 4 iterations) follows the document; the cipher functions follow the Serpent
// specification; the separate decryption logic, the load overlap and the handshake are this
// design's choices.
module serpent_i8
  import serpent_pkg::*;
(
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

  localparam int unsigned IROUNDS = ROUNDS / 8;      // implementation rounds per block

  words_t      state_q, enc_x, dec_x, in_x;
  logic        mode_q;
  logic        busy, last, done, ready;
  logic [2:0]  round;
  int unsigned j;

  control_unit #(.ROUNDS(IROUNDS)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (blk_valid),
    .stall (res_valid && !res_ready),
    .ready (ready),
    .busy  (busy),
    .round (round),
    .last  (last),
    .done  (done)
  );

  always_comb begin
    // Encryption: implementation round j = round-1, regular rounds 8j..8j+7.
    j     = int'(round) - 1;
    enc_x = state_q;
    for (int i = 0; i < 8; i++)
      enc_x = enc_round(enc_x, 8*j + i, keys[8*j + i], keys[ROUNDS]);
    // Decryption: implementation round IROUNDS-round, regular rounds descending.
    dec_x = state_q;
    for (int i = 7; i >= 0; i--)
      dec_x = dec_round(dec_x, 8*(IROUNDS - int'(round)) + i, keys[8*(IROUNDS - int'(round)) + i]);
    in_x = from_block(blk_data);
    if (blk_mode) in_x = in_x ^ keys[ROUNDS];
  end

  assign blk_ready = ready;
  assign res_valid = last;
  assign res_data  = to_block(mode_q ? dec_x : enc_x);
  assign res_mode  = mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      mode_q  <= 1'b0;
    end else if (ready && blk_valid) begin
      state_q <= in_x;
      mode_q  <= blk_mode;
    end else if (busy && !last) begin
      state_q <= mode_q ? dec_x : enc_x;
    end
  end

endmodule
