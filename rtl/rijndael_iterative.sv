// rijndael_iterative -- Rijndael (AES-128) encryption/decryption unit in the basic
// iterative architecture: one round of combinational logic, one 128-bit register and an
// input multiplexer.
//
// When a block is loaded, the multiplexer selects the input block XORed with the whitening
// key (round key 0 for encryption, round key 10 for decryption) and the register takes it.
// In each of the next 10 cycles the round logic computes one round from the register and
// the result is fed back through the multiplexer.  The output of the tenth round goes to
// the output interface in the same cycle a following block may be loaded, so the unit
// encrypts or decrypts one 128-bit block every 10 clock cycles and the latency from load
// to result is 10 cycles (throughput = 128 bits / (10 clock periods)).
//
// Encryption and decryption share the register, the multiplexer, the key memory, the
// control unit and the S-box memory (one table holds both S-boxes); ShiftRows/InvShiftRows
// and MixColumns/InvMixColumns are separate and selected by the direction of the block.
// Decryption is the straightforward inverse cipher with the round keys in reverse order, so
// one set of round keys, computed off chip, serves both directions.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt)
//   keys                                   the 11 round keys, from the key memory
//   res_valid/res_ready/res_data/res_mode  block out; res_ready low stalls the last round
//
// The architecture (one round, register, multiplexer, #rounds cycles per block) follows the
// document; the round ordering, the resource sharing details and the handshake are this
// design's choices.
module rijndael_iterative
  import rijndael_pkg::*;
(
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

  localparam int unsigned RW = $clog2(NR + 1);

  block_t        state_q;
  logic          mode_q;
  logic          busy, last, done, ready;
  logic [RW-1:0] round;
  block_t        subbed, round_key, round_out, whitening_key;

  control_unit #(.ROUNDS(NR)) u_ctrl (
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

  rijndael_sbox_layer #(.REGISTERED(1'b0)) u_sbox (
    .clk  (clk),
    .en   (1'b1),
    .dec  (mode_q),
    .din  (state_q),
    .dout (subbed)
  );

  // Round r uses key r when encrypting and key NR-r when decrypting.
  always_comb begin
    round_key     = keys[mode_q ? (NR - int'(round)) : int'(round)];
    whitening_key = keys[blk_mode ? NR : 0];
    round_out     = round_tail(subbed, round_key, mode_q, last);
  end

  assign blk_ready = ready;
  assign res_valid = last;
  assign res_data  = round_out;
  assign res_mode  = mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      mode_q  <= 1'b0;
    end else if (ready && blk_valid) begin
      state_q <= blk_data ^ whitening_key;
      mode_q  <= blk_mode;
    end else if (busy && !last) begin
      state_q <= round_out;
    end
  end

endmodule
