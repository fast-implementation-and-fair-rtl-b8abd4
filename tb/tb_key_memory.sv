// tb_key_memory -- checks the key memory (11 words of 128 bits, the Rijndael size)
// against an array model: zero after reset, random writes, every word of the parallel
// output compared every cycle, writes visible after one clock edge.
module tb_key_memory;
  localparam int WIDTH = 128, DEPTH = 11;

  logic             clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [3:0]       waddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [WIDTH-1:0] keys [DEPTH];
  logic [WIDTH-1:0] model [DEPTH] = '{default: '0};
  int               checks = 0, failures = 0, writes = 0;

  always #5 clk = ~clk;

  key_memory #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (keys[i] != model[i]) begin
          failures++;
          $display("FAIL: word %0d %h expected %h", i, keys[i], model[i]);
        end
      end
      if (we) begin
        model[waddr] <= wdata;
        writes++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (300) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = 4'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, $urandom, $urandom, $urandom};
    end
    @(negedge clk);
    we = 1'b0;
    @(posedge clk);
    checks++;
    if (writes < 100) failures++;
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
