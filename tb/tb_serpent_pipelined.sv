// tb_serpent_pipelined -- self-checking testbench of the fully pipelined Serpent unit
// (mixed inner- and outer-round pipelining) at its default of 3 inner stages per round.
//
// Round keys come from the reference key expansion.  Phase 1 streams the published
// Serpent-128 known-answer blocks and random blocks, one per clock cycle, encryption and
// decryption mixed block by block, with the output always ready: every result is compared
// with the reference model, the latency must be exactly 32 x 3 = 96 cycles and a new block
// must be accepted every cycle.  Phase 2 repeats with a randomly stalling output, which
// holds the whole pipeline, and checks that no block is lost or corrupted.
module tb_serpent_pipelined;
  import serpent_pkg::*;
  import serpent_ref_pkg::*;

  localparam int STAGES = 3;
  localparam int LAT = ROUNDS * STAGES;
  localparam int INTERVAL = 1;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   blk_valid = 1'b0, blk_ready, blk_mode = 1'b0;
  logic   res_valid, res_ready = 1'b1, res_mode;
  block_t blk_data = '0, res_data;
  words_t keys [NKEYS];

  int     checks = 0, failures = 0;
  longint cyc = 0;
  bit     exact_timing = 1'b1;

  always #5 clk = ~clk;

  serpent_pipelined dut (.*);

  typedef struct { block_t exp; logic mode; longint t_in; } exp_t;
  exp_t   q [$];
  longint last_load = -1;
  bit     in_burst = 1'b0;
  int     max_q = 0;
  int     stalls = 0, n_enc = 0, n_dec = 0;
  serpent_ref_pkg::rkeys_t k;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && blk_valid && blk_ready) begin
      exp_t e;
      e.exp  = blk_mode ? serpent_ref_pkg::decrypt(k, blk_data) : serpent_ref_pkg::encrypt(k, blk_data);
      e.mode = blk_mode;
      e.t_in = cyc;
      q.push_back(e);
      if (q.size() > max_q) max_q = q.size();
      if (exact_timing && in_burst && last_load >= 0)
        chk(cyc - last_load == INTERVAL, $sformatf("load interval %0d", cyc - last_load));
      last_load = cyc;
      if (blk_mode) n_dec++; else n_enc++;
    end
    if (rst_n && res_valid && !res_ready) stalls++;
    if (rst_n && res_valid && res_ready) begin
      if (q.size() == 0) chk(1'b0, "result without a block");
      else begin
        exp_t e;
        e = q.pop_front();
        chk(res_data == e.exp, $sformatf("data %h expected %h", res_data, e.exp));
        chk(res_mode == e.mode, "mode");
        if (exact_timing) chk(cyc - e.t_in == LAT, $sformatf("latency %0d", cyc - e.t_in));
      end
    end
  end

  task automatic send(block_t d, logic m);
    @(negedge clk);
    blk_data  = d;
    blk_mode  = m;
    blk_valid = 1'b1;
    do @(posedge clk); while (!blk_ready);
    @(negedge clk);
    blk_valid = 1'b0;
  endtask

  // Sends without a gap: the next block is presented right after the previous is taken.
  task automatic send_burst(int n, bit kat);
    blk_valid = 1'b0;
    last_load = -1;
    in_burst  = 1'b1;
    for (int i = 0; i < n; i++) begin
      block_t d;
      logic   m;
      d = {$urandom, $urandom, $urandom, $urandom};
      m = logic'($urandom_range(0, 1));
      if (kat && i == 0) begin d = 128'h0; m = 1'b0; end
      if (kat && i == 1) begin d = 128'h264e5481eff42a4606abda06c0bfda3d; m = 1'b1; end
      @(negedge clk);
      blk_data  = d;
      blk_mode  = m;
      blk_valid = 1'b1;
      do @(posedge clk); while (!blk_ready);
    end
    @(negedge clk);
    blk_valid = 1'b0;
    in_burst  = 1'b0;
  endtask

  initial begin
    k = schedule(128'h80000000000000000000000000000000);
    for (int i = 0; i < NKEYS; i++) keys[i] = words_t'(k[i]);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: output always ready, exact timing.
    send_burst(200, 1'b1);
    wait (q.size() == 0);
    // A second key, single blocks.
    k = schedule(128'h0);
    for (int i = 0; i < NKEYS; i++) keys[i] = words_t'(k[i]);
    last_load = -1;
    send(128'h0, 1'b0);
    send(128'h3620b17ae6a993d09618b8768266bae9, 1'b1);
    wait (q.size() == 0);
    // Phase 2: randomly stalling output.
    exact_timing = 1'b0;
    fork
      begin
        send_burst(300, 1'b0);
        wait (q.size() == 0);
      end
      begin
        repeat (1500) begin
          @(negedge clk);
          res_ready = ($urandom_range(0, 2) != 0);
        end
        res_ready = 1'b1;
      end
    join
    chk(max_q >= LAT, $sformatf("pipeline never full: %0d blocks in flight", max_q));
    chk(stalls > 0, "output stall never happened");
    chk(n_enc > 0 && n_dec > 0, "both directions used");
    $display("blocks enc=%0d dec=%0d stall cycles=%0d", n_enc, n_dec, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
