// tb_rijndael_sbox_layer -- checks both forms of the S-box layer against the reference
// S-box tables: every byte value in every one of the 16 positions, in both directions.
// The combinational form must answer in the same cycle; the registered form one clock
// edge after an enabled read, and hold its output while the read is disabled.
module tb_rijndael_sbox_layer;
  import rijndael_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 1'b0, en = 1'b0, dec = 1'b0;
  block_t din = '0, q_comb, q_reg;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  rijndael_sbox_layer #(.REGISTERED(1'b0)) u_comb (.clk, .en, .dec, .din, .dout(q_comb));
  rijndael_sbox_layer #(.REGISTERED(1'b1)) u_reg  (.clk, .en, .dec, .din, .dout(q_reg));

  function automatic block_t expect_of(block_t d, logic inv);
    block_t e;
    for (int i = 0; i < 16; i++)
      e[127-8*i -: 8] = inv ? isb[d[127-8*i -: 8]] : sb[d[127-8*i -: 8]];
    return e;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    block_t prev_exp, held;
    aes_ref_pkg::init();
    for (int m = 0; m < 2; m++)
      for (int v = 0; v < 256; v++) begin
        @(negedge clk);
        dec = logic'(m);
        en  = 1'b1;
        for (int i = 0; i < 16; i++) din[127-8*i -: 8] = 8'(v + 17 * i);
        #1;
        chk(q_comb == expect_of(din, dec), $sformatf("comb %0d %0d", m, v));
        prev_exp = expect_of(din, dec);
        @(posedge clk);
        #1;
        chk(q_reg == prev_exp, $sformatf("registered %0d %0d", m, v));
      end
    // Disabled reads hold the output.
    held = q_reg;
    @(negedge clk);
    en  = 1'b0;
    din = ~din;
    repeat (3) @(posedge clk);
    #1;
    chk(q_reg == held, "hold while disabled");
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
