// tb_rijndael_pipe_round -- checks pipelined Rijndael rounds against the reference round
// functions: a middle round with 3 inner stages and the last round (no MixColumns) with 2.
// Random blocks of both directions enter every cycle while the enable is toggled at
// random; a shift-register model of the pipeline, advancing on the same enable, gives the
// expected valid bit, direction and data at the output every cycle.
module tb_rijndael_pipe_round;
  import rijndael_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, en = 1'b0, in_valid = 1'b0, in_mode = 1'b0;
  block_t in_state = '0, key_enc, key_dec;
  logic   v3, m3, v2, m2;
  block_t s3, s2;
  int     checks = 0, failures = 0, n_valid = 0;

  always #5 clk = ~clk;

  rijndael_pipe_round #(.ROUND(4),  .STAGES(3)) u_mid (
    .clk, .rst_n, .en, .in_valid, .in_mode, .in_state, .key_enc, .key_dec,
    .out_valid(v3), .out_mode(m3), .out_state(s3));
  rijndael_pipe_round #(.ROUND(10), .STAGES(2)) u_last (
    .clk, .rst_n, .en, .in_valid, .in_mode, .in_state, .key_enc, .key_dec,
    .out_valid(v2), .out_mode(m2), .out_state(s2));

  typedef struct packed { logic v; logic m; block_t d3; block_t d2; } slot_t;
  slot_t pipe [3] = '{default: '0};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      // compare outputs (pre-edge values) with the model
      chk(v3 == pipe[2].v, "valid, 3 stages");
      chk(v2 == pipe[1].v, "valid, 2 stages");
      if (pipe[2].v) begin
        chk(m3 == pipe[2].m && s3 == pipe[2].d3, $sformatf("round 4: %h vs %h", s3, pipe[2].d3));
        n_valid++;
      end
      if (pipe[1].v) chk(m2 == pipe[1].m && s2 == pipe[1].d2, "round 10");
      if (en) begin
        slot_t n;
        n.v  = in_valid;
        n.m  = in_mode;
        n.d3 = in_mode ? dec_round(in_state, key_dec, 1'b0) : enc_round(in_state, key_enc, 1'b0);
        n.d2 = in_mode ? dec_round(in_state, key_dec, 1'b1) : enc_round(in_state, key_enc, 1'b1);
        pipe[2] <= pipe[1];
        pipe[1] <= pipe[0];
        pipe[0] <= n;
      end
    end
  end

  initial begin
    key_enc = {$urandom, $urandom, $urandom, $urandom};
    key_dec = {$urandom, $urandom, $urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (400) begin
      @(negedge clk);
      en       = ($urandom_range(0, 3) != 0);
      in_valid = ($urandom_range(0, 4) != 0);
      in_mode  = logic'($urandom_range(0, 1));
      in_state = {$urandom, $urandom, $urandom, $urandom};
    end
    chk(n_valid > 100, "enough blocks passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
