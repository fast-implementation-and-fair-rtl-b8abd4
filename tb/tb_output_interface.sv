// tb_output_interface -- checks the output register: results offered at random while the
// receiver takes them at random.  Every result must leave in order with its direction,
// none lost or doubled; res_ready must fall exactly when the register is full and not
// being emptied.
module tb_output_interface;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         res_valid = 1'b0, res_ready, res_mode = 1'b0, out_valid, out_ready = 1'b0, out_mode;
  logic [127:0] res_data = '0, out_data;
  int           checks = 0, failures = 0, n_out = 0, n_block = 0;

  always #5 clk = ~clk;

  output_interface #(.DATA_W(128)) dut (.*);

  typedef struct packed { logic [127:0] d; logic m; } blk_s;
  blk_s q [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      chk(res_ready == (!out_valid || out_ready), "res_ready");
      if (!res_ready) n_block++;
      if (out_valid && out_ready) begin
        blk_s e;
        if (q.size() == 0) chk(1'b0, "output from nowhere");
        else begin
          e = q.pop_front();
          chk(out_data == e.d && out_mode == e.m, "order/data/mode");
          n_out++;
        end
      end
      if (res_valid && res_ready) q.push_back('{res_data, res_mode});
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      @(negedge clk);
      if (!res_valid || res_ready) begin
        res_valid = ($urandom_range(0, 2) != 0);
        res_mode  = logic'($urandom_range(0, 1));
        res_data  = {$urandom, $urandom, $urandom, $urandom};
      end
      out_ready = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk);
    res_valid = 1'b0;
    out_ready = 1'b1;
    repeat (3) @(posedge clk);
    chk(q.size() == 0 && n_out > 100 && n_block > 10, "all results delivered, back-pressure seen");
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
