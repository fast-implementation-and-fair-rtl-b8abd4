// key_memory -- memory of internal (round) keys.
//
// The round keys are computed off chip and written here word by word through the input
// interface; the encryption/decryption unit reads them.  All DEPTH words are kept in
// registers and presented in parallel on `keys`, because the units need several keys at
// once: a basic iterative unit picks the key of the current round and the whitening key
// of the next block in the same cycle, and a fully pipelined unit needs every round key at
// the same time.  A write takes effect at the next clock edge.
//
//   we/waddr/wdata  write port, one word per cycle
//   keys            all words, index 0 first
//
// Keeping the keys in logic registers with a parallel read is this design's choice; the
// document only says that key scheduling is off chip and the keys are held on chip.
module key_memory #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         keys [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) keys[i] <= '0;
    end else if (we) begin
      keys[waddr] <= wdata;
    end
  end

  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (int'(waddr) < DEPTH));

endmodule
