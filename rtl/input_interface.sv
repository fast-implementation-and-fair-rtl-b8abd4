// input_interface -- the single input port of a cipher unit, shared by data and keys.
//
// One bus carries either a round key word (is_key = 1, written to the memory of internal
// keys at address `addr`) or a data block with its direction (is_key = 0, passed on to the
// encryption/decryption unit).  Both are registered once.  Data blocks go through a
// one-entry buffer with a valid/ready handshake, so the unit may refuse a block while it
// is busy; key words are always accepted and leave after one cycle.
//
//   in_valid/in_ready   handshake of the external bus (a transfer when both are high)
//   in_is_key/in_addr   what the word is and, for a key, where it goes
//   in_data/in_mode     block (or key word in its low KEY_W bits) and its direction
//   key_we/key_waddr/key_wdata   to the key memory, one cycle after the transfer
//   blk_valid/blk_ready/blk_data/blk_mode   to the encryption/decryption unit
//
// The document shows one input/key path feeding both the unit and the key memory; its
// width, the handshake and the buffering are this design's choices.  Rewriting the keys
// while a block is being processed changes the keys it uses; the user must avoid that.
module input_interface #(
  parameter int unsigned DATA_W  = 128,
  parameter int unsigned KEY_W   = 128,
  parameter int unsigned KADDR_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic               in_is_key,
  input  logic [KADDR_W-1:0] in_addr,
  input  logic [DATA_W-1:0]  in_data,
  input  logic               in_mode,
  output logic               key_we,
  output logic [KADDR_W-1:0] key_waddr,
  output logic [KEY_W-1:0]   key_wdata,
  output logic               blk_valid,
  input  logic               blk_ready,
  output logic [DATA_W-1:0]  blk_data,
  output logic               blk_mode
);

  logic take;

  // A key word is always accepted; a block only when the buffer is free or being emptied.
  assign in_ready = in_is_key || !blk_valid || blk_ready;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_we    <= 1'b0;
      key_waddr <= '0;
      key_wdata <= '0;
      blk_valid <= 1'b0;
      blk_data  <= '0;
      blk_mode  <= 1'b0;
    end else begin
      key_we <= take && in_is_key;
      if (take && in_is_key) begin
        key_waddr <= in_addr;
        key_wdata <= in_data[KEY_W-1:0];
      end
      if (take && !in_is_key) begin
        blk_valid <= 1'b1;
        blk_data  <= in_data;
        blk_mode  <= in_mode;
      end else if (blk_ready) begin
        blk_valid <= 1'b0;
      end
    end
  end

endmodule
