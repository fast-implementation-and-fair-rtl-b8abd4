// tb_aes_finalists_top -- end-to-end test of the whole design at its default parameters.
//
// The eight cipher units (Rijndael, RC6, Serpent I8 and Twofish in the basic iterative
// architecture; Rijndael, Serpent, RC6 and Twofish fully pipelined with 7, 3, 28 and 23
// inner stages per round) are exercised at the same time, each by its own thread, through the top-level buses only:
//   1. round keys of a first key are written over the input bus (off-chip key schedule
//      done by the reference model);
//   2. a burst of blocks, encryption and decryption mixed, with the output always ready:
//      the first result must appear exactly latency + 2 cycles after its transfer (one
//      cycle each for the input and output interface) and every later one exactly one
//      block time after the previous (10, 20, 4 and 16 cycles for the iterative units, 1 for
//      the pipelined ones);
//   3. the round keys of a second key are written and a burst follows with the receiver
//      first pausing, then taking results at random, so that the outputs stall and the
//      inputs are refused.
// Every result is compared with the reference model.  Each mechanism -- key loading,
// encryption, decryption, a direction switch between consecutive blocks, an output stall,
// a refused input, a full pipeline -- is counted per unit, and one that never happened
// counts as a failure.
module tb_aes_finalists_top;
  import aes_ref_pkg::*;
  import rc6_ref_pkg::*;
  import serpent_ref_pkg::*;
  import twofish_ref_pkg::*;

  localparam int NU = 8;
  // cipher of each unit: 0 Rijndael, 1 RC6, 2 Serpent, 3 Twofish
  localparam int CIPHER   [NU] = '{0, 1, 0, 2, 2, 1, 3, 3};
  localparam int LAT      [NU] = '{10, 20, 70, 4, 96, 560, 16, 368};
  localparam int INTERVAL [NU] = '{10, 20, 1, 4, 1, 1, 16, 1};
  localparam int NKW      [NU] = '{11, 44, 11, 33, 33, 44, 42, 42};
  localparam int NBURST   [NU] = '{12, 8, 150, 25, 200, 650, 10, 450};
  localparam string NAME  [NU] = '{"rijndael_iterative", "rc6_iterative", "rijndael_pipelined",
                                   "serpent_i8", "serpent_pipelined", "rc6_pipelined",
                                   "twofish_iterative", "twofish_pipelined"};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid [NU] = '{default: 1'b0};
  logic         in_ready [NU];
  logic         in_is_key[NU] = '{default: 1'b0};
  logic [5:0]   in_addr  [NU] = '{default: '0};
  logic [127:0] in_data  [NU] = '{default: '0};
  logic         in_mode  [NU] = '{default: 1'b0};
  logic         out_valid[NU];
  logic         out_ready[NU] = '{default: 1'b1};
  logic [127:0] out_data [NU];
  logic         out_mode [NU];

  aes_finalists_top dut (
    .clk, .rst_n,
    .rij_in_valid(in_valid[0]), .rij_in_ready(in_ready[0]), .rij_in_is_key(in_is_key[0]),
    .rij_in_addr(in_addr[0][3:0]), .rij_in_data(in_data[0]), .rij_in_mode(in_mode[0]),
    .rij_out_valid(out_valid[0]), .rij_out_ready(out_ready[0]), .rij_out_data(out_data[0]),
    .rij_out_mode(out_mode[0]),
    .rc6_in_valid(in_valid[1]), .rc6_in_ready(in_ready[1]), .rc6_in_is_key(in_is_key[1]),
    .rc6_in_addr(in_addr[1]), .rc6_in_data(in_data[1]), .rc6_in_mode(in_mode[1]),
    .rc6_out_valid(out_valid[1]), .rc6_out_ready(out_ready[1]), .rc6_out_data(out_data[1]),
    .rc6_out_mode(out_mode[1]),
    .rjp_in_valid(in_valid[2]), .rjp_in_ready(in_ready[2]), .rjp_in_is_key(in_is_key[2]),
    .rjp_in_addr(in_addr[2][3:0]), .rjp_in_data(in_data[2]), .rjp_in_mode(in_mode[2]),
    .rjp_out_valid(out_valid[2]), .rjp_out_ready(out_ready[2]), .rjp_out_data(out_data[2]),
    .rjp_out_mode(out_mode[2]),
    .spi_in_valid(in_valid[3]), .spi_in_ready(in_ready[3]), .spi_in_is_key(in_is_key[3]),
    .spi_in_addr(in_addr[3]), .spi_in_data(in_data[3]), .spi_in_mode(in_mode[3]),
    .spi_out_valid(out_valid[3]), .spi_out_ready(out_ready[3]), .spi_out_data(out_data[3]),
    .spi_out_mode(out_mode[3]),
    .spp_in_valid(in_valid[4]), .spp_in_ready(in_ready[4]), .spp_in_is_key(in_is_key[4]),
    .spp_in_addr(in_addr[4]), .spp_in_data(in_data[4]), .spp_in_mode(in_mode[4]),
    .spp_out_valid(out_valid[4]), .spp_out_ready(out_ready[4]), .spp_out_data(out_data[4]),
    .spp_out_mode(out_mode[4]),
    .rcp_in_valid(in_valid[5]), .rcp_in_ready(in_ready[5]), .rcp_in_is_key(in_is_key[5]),
    .rcp_in_addr(in_addr[5]), .rcp_in_data(in_data[5]), .rcp_in_mode(in_mode[5]),
    .rcp_out_valid(out_valid[5]), .rcp_out_ready(out_ready[5]), .rcp_out_data(out_data[5]),
    .rcp_out_mode(out_mode[5]),
    .twf_in_valid(in_valid[6]), .twf_in_ready(in_ready[6]), .twf_in_is_key(in_is_key[6]),
    .twf_in_addr(in_addr[6]), .twf_in_data(in_data[6]), .twf_in_mode(in_mode[6]),
    .twf_out_valid(out_valid[6]), .twf_out_ready(out_ready[6]), .twf_out_data(out_data[6]),
    .twf_out_mode(out_mode[6]),
    .twp_in_valid(in_valid[7]), .twp_in_ready(in_ready[7]), .twp_in_is_key(in_is_key[7]),
    .twp_in_addr(in_addr[7]), .twp_in_data(in_data[7]), .twp_in_mode(in_mode[7]),
    .twp_out_valid(out_valid[7]), .twp_out_ready(out_ready[7]), .twp_out_data(out_data[7]),
    .twp_out_mode(out_mode[7])
  );

  int     checks = 0, failures = 0;
  longint cyc = 0;

  // Current round keys per unit, as the reference model computed them.
  aes_ref_pkg::keys_t      aes_k [NU];
  rc6_ref_pkg::skeys_t     rc6_k [NU];
  serpent_ref_pkg::rkeys_t sp_k  [NU];
  twofish_ref_pkg::keys_t  tf_k  [NU];

  typedef struct { logic [127:0] exp; logic mode; longint t_in; } exp_t;
  exp_t   q [NU][$];
  bit     exact [NU]      = '{default: 1'b0};
  bit     first_out [NU]  = '{default: 1'b0};
  longint last_out [NU]   = '{default: -1};
  logic   last_mode [NU]  = '{default: 1'b0};
  bit     any_blk [NU]    = '{default: 1'b0};
  int     n_keyw [NU]     = '{default: 0};
  int     n_enc [NU]      = '{default: 0};
  int     n_dec [NU]      = '{default: 0};
  int     n_switch [NU]   = '{default: 0};
  int     n_stall [NU]    = '{default: 0};
  int     n_refused [NU]  = '{default: 0};
  int     max_q [NU]      = '{default: 0};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic logic [127:0] reference(int u, logic [127:0] d, logic m);
    if (CIPHER[u] == 1) return m ? rc6_ref_pkg::decrypt(rc6_k[u], d) : rc6_ref_pkg::encrypt(rc6_k[u], d);
    if (CIPHER[u] == 2) return m ? serpent_ref_pkg::decrypt(sp_k[u], d) : serpent_ref_pkg::encrypt(sp_k[u], d);
    if (CIPHER[u] == 3) return m ? twofish_ref_pkg::decrypt(d, tf_k[u]) : twofish_ref_pkg::encrypt(d, tf_k[u]);
    return m ? aes_ref_pkg::decrypt(aes_k[u], d) : aes_ref_pkg::encrypt(aes_k[u], d);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int u = 0; u < NU; u++) begin
        if (in_valid[u] && in_ready[u] && in_is_key[u]) n_keyw[u]++;
        if (in_valid[u] && !in_ready[u]) n_refused[u]++;
        if (in_valid[u] && in_ready[u] && !in_is_key[u]) begin
          exp_t e;
          e.exp  = reference(u, in_data[u], in_mode[u]);
          e.mode = in_mode[u];
          e.t_in = cyc;
          q[u].push_back(e);
          if (q[u].size() > max_q[u]) max_q[u] = q[u].size();
          if (in_mode[u]) n_dec[u]++; else n_enc[u]++;
          if (any_blk[u] && in_mode[u] != last_mode[u]) n_switch[u]++;
          any_blk[u]   = 1'b1;
          last_mode[u] = in_mode[u];
        end
        if (out_valid[u] && !out_ready[u]) n_stall[u]++;
        if (out_valid[u] && out_ready[u]) begin
          if (q[u].size() == 0) chk(1'b0, {NAME[u], ": result without a block"});
          else begin
            exp_t e;
            e = q[u].pop_front();
            chk(out_data[u] == e.exp && out_mode[u] == e.mode,
                $sformatf("%s: %h expected %h", NAME[u], out_data[u], e.exp));
            if (exact[u]) begin
              if (first_out[u])
                chk(cyc - e.t_in == LAT[u] + 2,
                    $sformatf("%s: latency %0d", NAME[u], cyc - e.t_in));
              else
                chk(cyc - last_out[u] == INTERVAL[u],
                    $sformatf("%s: interval %0d", NAME[u], cyc - last_out[u]));
            end
            first_out[u] = 1'b0;
            last_out[u]  = cyc;
          end
        end
      end
    end
  end

  task automatic put(int u, logic is_key, logic [5:0] addr, logic [127:0] d, logic m);
    @(negedge clk);
    in_valid[u]  = 1'b1;
    in_is_key[u] = is_key;
    in_addr[u]   = addr;
    in_data[u]   = d;
    in_mode[u]   = m;
    do @(posedge clk); while (!in_ready[u]);
  endtask

  task automatic idle(int u);
    @(negedge clk);
    in_valid[u] = 1'b0;
  endtask

  task automatic load_keys(int u, logic [127:0] key);
    if (CIPHER[u] == 1) begin
      rc6_k[u] = rc6_ref_pkg::schedule(key);
      for (int i = 0; i < 44; i++) put(u, 1'b1, 6'(i), {96'h0, rc6_k[u][i]}, 1'b0);
    end else if (CIPHER[u] == 2) begin
      sp_k[u] = serpent_ref_pkg::schedule(key);
      for (int i = 0; i < 33; i++) put(u, 1'b1, 6'(i), sp_k[u][i], 1'b0);
    end else if (CIPHER[u] == 3) begin
      tf_k[u] = twofish_ref_pkg::schedule(key);
      for (int i = 0; i < 42; i++) put(u, 1'b1, 6'(i), {96'h0, tf_k[u][i]}, 1'b0);
    end else begin
      aes_k[u] = aes_ref_pkg::expand(key);
      for (int i = 0; i < 11; i++) put(u, 1'b1, 6'(i), aes_k[u][i], 1'b0);
    end
    idle(u);
  endtask

  task automatic burst(int u, int n);
    for (int i = 0; i < n; i++)
      put(u, 1'b0, '0, {$urandom, $urandom, $urandom, $urandom}, logic'($urandom_range(0, 1)));
    idle(u);
  endtask

  task automatic drain(int u);
    while (q[u].size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic run_unit(int u);
    logic [127:0] key1, key2;
    case (CIPHER[u])
      1:       key1 = 128'h0123456789abcdef0112233445566778;
      2:       key1 = 128'h80000000000000000000000000000000;
      3:       key1 = 128'h0;
      default: key1 = 128'h000102030405060708090a0b0c0d0e0f;
    endcase
    key2 = {$urandom, $urandom, $urandom, $urandom};
    load_keys(u, key1);
    // Known-answer block first, then a burst with the output always ready.
    exact[u]     = 1'b1;
    first_out[u] = 1'b1;
    case (CIPHER[u])
      1:       put(u, 1'b0, '0, 128'h02132435465768798a9bacbdcedfe0f1, 1'b0);
      2:       put(u, 1'b0, '0, 128'h0, 1'b0);
      3:       put(u, 1'b0, '0, 128'h0, 1'b0);
      default: put(u, 1'b0, '0, 128'h00112233445566778899aabbccddeeff, 1'b0);
    endcase
    burst(u, NBURST[u]);
    drain(u);
    exact[u] = 1'b0;
    // Second key, receiver stalling at random.
    load_keys(u, key2);
    fork
      begin
        burst(u, NBURST[u]);
        drain(u);
      end
      begin
        while (q[u].size() == 0) @(negedge clk);
        // A fixed pause of three block times first: the output register fills and the
        // next result must wait, so every unit stalls at least once.
        out_ready[u] = 1'b0;
        repeat (3 * INTERVAL[u] + LAT[u] + 4) @(negedge clk);
        // Random receiver: ready or not for runs of up to two block times, so that
        // even the slowest iterative unit finds its output register still full.
        while (q[u].size() != 0) begin
          out_ready[u] = ($urandom_range(0, 2) != 0);
          repeat ($urandom_range(1, 2 * INTERVAL[u] + 2)) @(negedge clk);
        end
        out_ready[u] = 1'b1;
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_unit(0);
      run_unit(1);
      run_unit(2);
      run_unit(3);
      run_unit(4);
      run_unit(5);
      run_unit(6);
      run_unit(7);
    join
    for (int u = 0; u < NU; u++) begin
      $display("%s: key words %0d, enc %0d, dec %0d, direction switches %0d, output stalls %0d, refused inputs %0d, most blocks in flight %0d",
               NAME[u], n_keyw[u], n_enc[u], n_dec[u], n_switch[u], n_stall[u], n_refused[u], max_q[u]);
      chk(n_keyw[u] == 2 * NKW[u], {NAME[u], ": key loading"});
      chk(n_enc[u] > 0, {NAME[u], ": encryption never happened"});
      chk(n_dec[u] > 0, {NAME[u], ": decryption never happened"});
      chk(n_switch[u] > 0, {NAME[u], ": direction switch never happened"});
      chk(n_stall[u] > 0, {NAME[u], ": output stall never happened"});
      chk(n_refused[u] > 0, {NAME[u], ": refused input never happened"});
    end
    for (int u = 0; u < NU; u++)
      if (INTERVAL[u] == 1)
        chk(max_q[u] >= LAT[u], {NAME[u], ": pipeline never held a block in every stage"});
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
