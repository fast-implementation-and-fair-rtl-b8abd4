// control_unit -- round sequencer of a basic iterative encryption/decryption unit.
//
// The datapath of a basic iterative unit is one cipher round, a multiplexer and a register.
// This unit decides, every clock cycle, whether the multiplexer loads a new input block or
// feeds the round output back, and which round is being computed.  A block is loaded in
// the cycle `start` is high; rounds 1..ROUNDS are then computed in the next ROUNDS cycles,
// so one block takes exactly ROUNDS clock cycles, as in the document's basic iterative
// architecture.  In the cycle of the last round the result is handed to the output and a
// new block may be loaded at the same time, so blocks follow each other without a gap.
// `stall` freezes the sequencer in the last round while the output cannot take the result.
//
//   start   load a block now (only honoured when ready is high)
//   ready   the datapath can load a block this cycle (idle, or finishing the last round)
//   busy    a round is being computed this cycle
//   round   number of that round, 1..ROUNDS
//   last    this is round ROUNDS; `done` pulses when its result is taken
//
// The encoding of the state, the overlapped load and the stall are this design's choices.
module control_unit #(
  parameter int unsigned ROUNDS = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       stall,
  output logic                       ready,
  output logic                       busy,
  output logic [$clog2(ROUNDS+1)-1:0] round,
  output logic                       last,
  output logic                       done
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e                        state_q;
  logic [$clog2(ROUNDS+1)-1:0]   round_q;

  assign busy  = (state_q == S_RUN);
  assign round = round_q;
  assign last  = busy && (round_q == ($clog2(ROUNDS+1))'(ROUNDS));
  assign done  = last && !stall;
  assign ready = !busy || done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      round_q <= '0;
    end else if (ready && start) begin
      state_q <= S_RUN;
      round_q <= ($clog2(ROUNDS+1))'(1);
    end else if (done) begin
      state_q <= S_IDLE;
      round_q <= '0;
    end else if (busy && !last) begin
      round_q <= round_q + 1'b1;
    end
  end

  // A round number outside 1..ROUNDS never occurs while busy.
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (int'(round_q) >= 1 && int'(round_q) <= int'(ROUNDS)));

endmodule
