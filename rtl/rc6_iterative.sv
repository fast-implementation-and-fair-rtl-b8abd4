// rc6_iterative -- RC6 encryption/decryption unit in the basic iterative architecture:
// one RC6 round of combinational logic, a 128-bit register (A, B, C, D) and an input
// multiplexer.
//
// Loading a block applies the pre-whitening (encryption: B += S[0], D += S[1]; decryption:
// C -= S[43], A -= S[42]) on the way into the register.  In each of the next 20 cycles
// one round is computed and fed back.  The post-whitening (encryption: A += S[42],
// C += S[43]; decryption: D -= S[1], B -= S[0]) is applied on the way out in the cycle of
// the last round, in which the next block may already be loaded.  One block therefore takes
// 20 clock cycles, latency and throughput alike.
//
// Encryption and decryption share the register, the multiplexer and, most importantly, the
// two 32x32-bit multipliers of the function f(x) = (x(2x+1)) <<< 5: encryption applies f
// to B and D, decryption to A and C of the register, chosen by a multiplexer in front of
// the shared units.  Adders/subtractors and rotators are separate per direction.
//
//   blk_valid/blk_ready/blk_data/blk_mode  block in (mode 1 = decrypt)
//   keys                                   the 44 round key words S[0..43]
//   res_valid/res_ready/res_data/res_mode  block out; res_ready low stalls the last round
//
// The architecture follows the document; sharing f between the directions follows its
// statement that encryption and decryption share as many resources as possible; the exact
// split and the handshake are this design's choices.
module rc6_iterative
  import rc6_pkg::*;
(
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

  localparam int unsigned RW = $clog2(R + 1);

  regs_t         st_q, st_in, st_round, st_final;
  logic          mode_q;
  logic          busy, last, done, ready;
  logic [RW-1:0] round;
  word_t         f_x, f_y, t, u, s_lo, s_hi;
  int unsigned   i;

  control_unit #(.ROUNDS(R)) u_ctrl (
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
    regs_t in_r;
    // Round index of the cipher: 1..20 when encrypting, 20..1 when decrypting.
    i    = mode_q ? (R + 1 - int'(round)) : int'(round);
    s_lo = keys[2*i];
    s_hi = keys[2*i + 1];

    // Shared quadratic function units.
    f_x = quad(mode_q ? st_q.a : st_q.b);
    f_y = quad(mode_q ? st_q.c : st_q.d);

    if (!mode_q) begin
      t = f_x;  u = f_y;
      // A' = ((A ^ t) <<< u) + S[2i], C' = ((C ^ u) <<< t) + S[2i+1],
      // then (A,B,C,D) <- (B, C', D, A')
      st_round.a = st_q.b;
      st_round.b = rotl(st_q.c ^ u, t[4:0]) + s_hi;
      st_round.c = st_q.d;
      st_round.d = rotl(st_q.a ^ t, u[4:0]) + s_lo;
    end else begin
      t = f_x;  u = f_y;
      // rotate right first: (A,B,C,D) <- (D,A,B,C), then undo the round
      st_round.a = rotr(st_q.d - s_lo, u[4:0]) ^ t;
      st_round.b = st_q.a;
      st_round.c = rotr(st_q.b - s_hi, t[4:0]) ^ u;
      st_round.d = st_q.c;
    end

    // Post-whitening on the round output.
    st_final = st_round;
    if (!mode_q) begin
      st_final.a = st_round.a + keys[2*R + 2];
      st_final.c = st_round.c + keys[2*R + 3];
    end else begin
      st_final.b = st_round.b - keys[0];
      st_final.d = st_round.d - keys[1];
    end

    // Pre-whitening of a block being loaded.
    in_r  = unpack_block(blk_data);
    st_in = in_r;
    if (!blk_mode) begin
      st_in.b = in_r.b + keys[0];
      st_in.d = in_r.d + keys[1];
    end else begin
      st_in.a = in_r.a - keys[2*R + 2];
      st_in.c = in_r.c - keys[2*R + 3];
    end
  end

  assign blk_ready = ready;
  assign res_valid = last;
  assign res_data  = pack_block(st_final);
  assign res_mode  = mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= '0;
      mode_q <= 1'b0;
    end else if (ready && blk_valid) begin
      st_q   <= st_in;
      mode_q <= blk_mode;
    end else if (busy && !last) begin
      st_q   <= st_round;
    end
  end

endmodule
