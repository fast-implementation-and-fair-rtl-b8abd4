// rijndael_sbox_layer -- the 16 byte substitutions of one Rijndael round, for either
// direction, read from one shared 512-entry table (forward S-box, then inverse S-box).
//
// Each of the 16 lookups addresses the table with {dec, byte}, so encryption and decryption
// share one memory and the direction of every block can change from one block to the next.
// REGISTERED = 1 gives a synchronous read (address presented in one cycle, data valid after
// the clock edge when en is high), as a block RAM does; this is the first inner pipeline
// register of a pipelined round.  REGISTERED = 0 gives a combinational read, as look-up
// tables in logic cells do, for the basic iterative unit.
// Keeping the S-boxes in a memory for the pipelined unit follows the document; the
// combined forward/inverse table and the combinational read in the iterative unit are
// this design's choices.
module rijndael_sbox_layer
  import rijndael_pkg::*;
#(
  parameter bit REGISTERED = 1'b0
) (
  input  logic   clk,
  input  logic   en,     // read enable for the registered form
  input  logic   dec,    // 1: inverse S-box
  input  block_t din,
  output block_t dout
);

  localparam sbox_table_t TABLE = build_sbox_table();

  block_t looked_up;

  always_comb begin
    for (int i = 0; i < 16; i++)
      looked_up[BLOCK_BITS-1-8*i -: 8] = TABLE[{dec, din[BLOCK_BITS-1-8*i -: 8]}];
  end

  if (REGISTERED) begin : g_sync
    always_ff @(posedge clk)
      if (en) dout <= looked_up;
  end else begin : g_async
    assign dout = looked_up;
  end

endmodule
