// tb_rijndael_iterative -- self-checking testbench of the basic iterative Rijndael unit.
//
// Round keys come from the reference key expansion.  Phase 1 sends the two published
// AES-128 known-answer blocks and random blocks back to back, in both directions mixed,
// with the output always ready: every result is compared with the reference model, the
// latency from load to result must be exactly 10 cycles and consecutive loads exactly
// 10 cycles apart.  Phase 2 repeats with a randomly stalling output and checks the data.
module tb_rijndael_iterative;
  import rijndael_pkg::*;
  import aes_ref_pkg::*;

  localparam int LAT = 10;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   blk_valid = 1'b0, blk_ready, blk_mode = 1'b0;
  logic   res_valid, res_ready = 1'b1, res_mode;
  block_t blk_data = '0, res_data;
  block_t keys [NKEYS];

  int     checks = 0, failures = 0;
  longint cyc = 0;
  bit     exact_timing = 1'b1;

  always #5 clk = ~clk;

  rijndael_iterative dut (.*);

  typedef struct { block_t exp; logic mode; longint t_in; } exp_t;
  exp_t   q [$];
  longint last_load = -1;
  int     stalls = 0, n_enc = 0, n_dec = 0;
  aes_ref_pkg::keys_t k;

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
      e.exp  = blk_mode ? aes_ref_pkg::decrypt(k, blk_data) : aes_ref_pkg::encrypt(k, blk_data);
      e.mode = blk_mode;
      e.t_in = cyc;
      q.push_back(e);
      if (exact_timing && last_load >= 0 && cyc - last_load < 3 * LAT)
        chk(cyc - last_load == LAT, $sformatf("load interval %0d", cyc - last_load));
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
    for (int i = 0; i < n; i++) begin
      block_t d;
      logic   m;
      d = {$urandom, $urandom, $urandom, $urandom};
      m = logic'($urandom_range(0, 1));
      if (kat && i == 0) begin d = 128'h00112233445566778899aabbccddeeff; m = 1'b0; end
      if (kat && i == 1) begin d = 128'h69c4e0d86a7b0430d8cdb78070b4c55a; m = 1'b1; end
      @(negedge clk);
      blk_data  = d;
      blk_mode  = m;
      blk_valid = 1'b1;
      do @(posedge clk); while (!blk_ready);
    end
    @(negedge clk);
    blk_valid = 1'b0;
  endtask

  initial begin
    k = expand(128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < NKEYS; i++) keys[i] = k[i];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: output always ready, exact timing.
    send_burst(20, 1'b1);
    wait (q.size() == 0);
    // A second key, single blocks.
    k = expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int i = 0; i < NKEYS; i++) keys[i] = k[i];
    last_load = -1;
    send(128'h3243f6a8885a308d313198a2e0370734, 1'b0);
    send(128'h3925841d02dc09fbdc118597196a0b32, 1'b1);
    wait (q.size() == 0);
    // Phase 2: randomly stalling output.
    exact_timing = 1'b0;
    fork
      begin
        send_burst(30, 1'b0);
        wait (q.size() == 0);
      end
      begin
        repeat (600) begin
          @(negedge clk);
          res_ready = ($urandom_range(0, 2) != 0);
        end
        res_ready = 1'b1;
      end
    join
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
