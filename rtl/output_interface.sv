// output_interface -- output register of a cipher unit with a valid/ready handshake.
//
// The encryption/decryption unit offers a finished block with res_valid; the register
// takes it when it is empty or being emptied in the same cycle (res_ready), and holds it
// on out_data until the receiver takes it (out_valid and out_ready both high).  When the
// receiver does not take a block, res_ready falls and the unit stalls.
// The document shows an output interface; its register and handshake are this design's
// choices.
module output_interface #(
  parameter int unsigned DATA_W = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              res_valid,
  output logic              res_ready,
  input  logic [DATA_W-1:0] res_data,
  input  logic              res_mode,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_mode
);

  assign res_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_mode  <= 1'b0;
    end else if (res_ready) begin
      out_valid <= res_valid;
      if (res_valid) begin
        out_data <= res_data;
        out_mode <= res_mode;
      end
    end
  end

  // A held block must not change until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
