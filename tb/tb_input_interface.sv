// tb_input_interface -- checks the shared data/key input bus: a random mix of key words
// and data blocks is offered while the downstream unit accepts blocks at random.  Key
// words must always be accepted and appear on the key write port exactly one cycle after
// the transfer; blocks must reach the unit in order, with their direction, none lost or
// doubled; a block must be refused while the buffer is full and not being emptied.
module tb_input_interface;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, in_is_key = 1'b0, in_mode = 1'b0;
  logic [3:0]   in_addr = '0;
  logic [127:0] in_data = '0;
  logic         key_we, blk_valid, blk_ready = 1'b0, blk_mode;
  logic [3:0]   key_waddr;
  logic [127:0] key_wdata, blk_data;
  int           checks = 0, failures = 0, refused = 0, n_keys = 0, n_blks = 0;

  always #5 clk = ~clk;

  input_interface #(.DATA_W(128), .KEY_W(128), .KADDR_W(4)) dut (.*);

  typedef struct packed { logic [127:0] d; logic m; } blk_s;
  blk_s   q [$];
  logic   exp_we = 1'b0;
  logic [3:0]   exp_addr;
  logic [127:0] exp_data;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      chk(key_we == exp_we, "key write strobe");
      if (exp_we) chk(key_waddr == exp_addr && key_wdata == exp_data, "key write address/data");
      if (in_valid && in_is_key) chk(in_ready, "key word refused");
      if (in_valid && !in_ready) refused++;
      exp_we <= in_valid && in_ready && in_is_key;
      exp_addr <= in_addr;
      exp_data <= in_data;
      if (in_valid && in_ready && in_is_key) n_keys++;
      if (in_valid && in_ready && !in_is_key) q.push_back('{in_data, in_mode});
      if (blk_valid && blk_ready) begin
        blk_s e;
        if (q.size() == 0) chk(1'b0, "block from nowhere");
        else begin
          e = q.pop_front();
          chk(blk_data == e.d && blk_mode == e.m, "block order/data/mode");
          n_blks++;
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid  = ($urandom_range(0, 3) != 0);
        in_is_key = ($urandom_range(0, 2) == 0);
        in_addr   = 4'($urandom);
        in_mode   = logic'($urandom_range(0, 1));
        in_data   = {$urandom, $urandom, $urandom, $urandom};
      end
      blk_ready = ($urandom_range(0, 2) == 0);
    end
    @(negedge clk);
    in_valid  = 1'b0;
    blk_ready = 1'b1;
    repeat (3) @(posedge clk);
    chk(q.size() == 0, "blocks left behind");
    chk(refused > 0 && n_keys > 20 && n_blks > 20, "refusals, keys and blocks seen");
    $display("keys=%0d blocks=%0d refused=%0d", n_keys, n_blks, refused);
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
