// aes_finalists_top -- FPGA implementations of AES final candidates, side by side.
//
// Eight cipher units, each built on the general block diagram of a block cipher in
// hardware: an input interface on a shared data/key bus, a memory of internal keys (round
// keys computed off chip and written through that bus), an encryption/decryption unit with
// its control, and an output interface.  The units are independent and have separate ports.
// Basic iterative architecture, for feedback modes (CBC, CFB, OFB):
//   rij_*  Rijndael:   1 round per cycle, 1 block per 10 cycles
//   rc6_*  RC6:        1 round per cycle, 1 block per 20 cycles
//   spi_*  Serpent I8: 8 rounds per cycle, 1 block per 4 cycles
// Full mixed inner- and outer-round pipelining, for non-feedback modes (ECB, counter):
//   rjp_*  Rijndael:   1 block per cycle, latency 10 x RJP_INNER_STAGES cycles
//   spp_*  Serpent:    1 block per cycle, latency 32 x SPP_INNER_STAGES cycles
//   rcp_*  RC6:        1 block per cycle, latency 20 x RCP_INNER_STAGES cycles
// Twofish, in both architectures:
//   twf_*  Twofish:    1 round per cycle, 1 block per 16 cycles (basic iterative)
//   twp_*  Twofish:    1 block per cycle, latency 16 x TWP_INNER_STAGES cycles (pipelined)
//
// Per unit the bus protocol is: a transfer happens when *_in_valid and *_in_ready are both
// high.  With *_in_is_key high, *_in_data (low bits) is a round key word written to key
// address *_in_addr (Rijndael: 128-bit round keys 0..10; RC6: 32-bit words S[0..43];
// Serpent: 128-bit round keys K0..K32, packed {K.x0, K.x1, K.x2, K.x3};
// Twofish: 32-bit words K0..K39 at addresses 0..39, S-box key words S0, S1 at 40, 41).  With *_in_is_key
// low, *_in_data is a 128-bit block and *_in_mode its direction (0 encrypt, 1 decrypt).
// Results leave on *_out_data with *_out_mode, held until *_out_valid and *_out_ready are
// both high.  Through the top, a unit's latency grows by 2 cycles (input and output
// interface registers).  Keys must not be rewritten while blocks that use them are inside
// the unit.  Bus widths and handshakes are this design's choices.
module aes_finalists_top
  import rijndael_pkg::*;
#(
  parameter int unsigned RJP_INNER_STAGES = 7,
  parameter int unsigned SPP_INNER_STAGES = 3,
  parameter int unsigned RCP_INNER_STAGES = 28,
  parameter int unsigned TWP_INNER_STAGES = 23
) (
  input  logic         clk,
  input  logic         rst_n,
  // Rijndael, basic iterative
  input  logic         rij_in_valid,
  output logic         rij_in_ready,
  input  logic         rij_in_is_key,
  input  logic [3:0]   rij_in_addr,
  input  logic [127:0] rij_in_data,
  input  logic         rij_in_mode,
  output logic         rij_out_valid,
  input  logic         rij_out_ready,
  output logic [127:0] rij_out_data,
  output logic         rij_out_mode,
  // RC6, basic iterative
  input  logic         rc6_in_valid,
  output logic         rc6_in_ready,
  input  logic         rc6_in_is_key,
  input  logic [5:0]   rc6_in_addr,
  input  logic [127:0] rc6_in_data,
  input  logic         rc6_in_mode,
  output logic         rc6_out_valid,
  input  logic         rc6_out_ready,
  output logic [127:0] rc6_out_data,
  output logic         rc6_out_mode,
  // Rijndael, full mixed inner- and outer-round pipelining
  input  logic         rjp_in_valid,
  output logic         rjp_in_ready,
  input  logic         rjp_in_is_key,
  input  logic [3:0]   rjp_in_addr,
  input  logic [127:0] rjp_in_data,
  input  logic         rjp_in_mode,
  output logic         rjp_out_valid,
  input  logic         rjp_out_ready,
  output logic [127:0] rjp_out_data,
  output logic         rjp_out_mode,
  // Serpent I8, basic iterative
  input  logic         spi_in_valid,
  output logic         spi_in_ready,
  input  logic         spi_in_is_key,
  input  logic [5:0]   spi_in_addr,
  input  logic [127:0] spi_in_data,
  input  logic         spi_in_mode,
  output logic         spi_out_valid,
  input  logic         spi_out_ready,
  output logic [127:0] spi_out_data,
  output logic         spi_out_mode,
  // Serpent, full mixed inner- and outer-round pipelining
  input  logic         spp_in_valid,
  output logic         spp_in_ready,
  input  logic         spp_in_is_key,
  input  logic [5:0]   spp_in_addr,
  input  logic [127:0] spp_in_data,
  input  logic         spp_in_mode,
  output logic         spp_out_valid,
  input  logic         spp_out_ready,
  output logic [127:0] spp_out_data,
  output logic         spp_out_mode,
  // RC6, full mixed inner- and outer-round pipelining
  input  logic         rcp_in_valid,
  output logic         rcp_in_ready,
  input  logic         rcp_in_is_key,
  input  logic [5:0]   rcp_in_addr,
  input  logic [127:0] rcp_in_data,
  input  logic         rcp_in_mode,
  output logic         rcp_out_valid,
  input  logic         rcp_out_ready,
  output logic [127:0] rcp_out_data,
  output logic         rcp_out_mode,
  input  logic         twf_in_valid,
  output logic         twf_in_ready,
  input  logic         twf_in_is_key,
  input  logic [5:0]   twf_in_addr,
  input  logic [127:0] twf_in_data,
  input  logic         twf_in_mode,
  output logic         twf_out_valid,
  input  logic         twf_out_ready,
  output logic [127:0] twf_out_data,
  output logic         twf_out_mode,
  input  logic         twp_in_valid,
  output logic         twp_in_ready,
  input  logic         twp_in_is_key,
  input  logic [5:0]   twp_in_addr,
  input  logic [127:0] twp_in_data,
  input  logic         twp_in_mode,
  output logic         twp_out_valid,
  input  logic         twp_out_ready,
  output logic [127:0] twp_out_data,
  output logic         twp_out_mode
);

  // ------------------------------------------------------------ Rijndael, iterative
  logic         rij_kwe, rij_bvalid, rij_bready, rij_bmode, rij_rvalid, rij_rready, rij_rmode;
  logic [3:0]   rij_kaddr;
  block_t       rij_kdata, rij_bdata, rij_rdata;
  block_t       rij_keys [NKEYS];

  input_interface #(.DATA_W(128), .KEY_W(128), .KADDR_W(4)) u_rij_in (
    .clk, .rst_n,
    .in_valid (rij_in_valid), .in_ready (rij_in_ready), .in_is_key (rij_in_is_key),
    .in_addr  (rij_in_addr),  .in_data  (rij_in_data),  .in_mode   (rij_in_mode),
    .key_we   (rij_kwe),      .key_waddr (rij_kaddr),   .key_wdata (rij_kdata),
    .blk_valid (rij_bvalid),  .blk_ready (rij_bready),  .blk_data (rij_bdata),
    .blk_mode  (rij_bmode)
  );

  key_memory #(.WIDTH(128), .DEPTH(NKEYS)) u_rij_keys (
    .clk, .rst_n, .we (rij_kwe), .waddr (rij_kaddr), .wdata (rij_kdata), .keys (rij_keys)
  );

  rijndael_iterative u_rij (
    .clk, .rst_n,
    .blk_valid (rij_bvalid), .blk_ready (rij_bready), .blk_data (rij_bdata),
    .blk_mode  (rij_bmode),  .keys (rij_keys),
    .res_valid (rij_rvalid), .res_ready (rij_rready), .res_data (rij_rdata),
    .res_mode  (rij_rmode)
  );

  output_interface #(.DATA_W(128)) u_rij_out (
    .clk, .rst_n,
    .res_valid (rij_rvalid), .res_ready (rij_rready), .res_data (rij_rdata),
    .res_mode  (rij_rmode),
    .out_valid (rij_out_valid), .out_ready (rij_out_ready), .out_data (rij_out_data),
    .out_mode  (rij_out_mode)
  );

  // ------------------------------------------------------------ RC6, iterative
  logic         rc6_kwe, rc6_bvalid, rc6_bready, rc6_bmode, rc6_rvalid, rc6_rready, rc6_rmode;
  logic [5:0]   rc6_kaddr;
  logic [31:0]  rc6_kdata;
  logic [127:0] rc6_bdata, rc6_rdata;
  logic [31:0]  rc6_keys [rc6_pkg::NWORDS];

  input_interface #(.DATA_W(128), .KEY_W(32), .KADDR_W(6)) u_rc6_in (
    .clk, .rst_n,
    .in_valid (rc6_in_valid), .in_ready (rc6_in_ready), .in_is_key (rc6_in_is_key),
    .in_addr  (rc6_in_addr),  .in_data  (rc6_in_data),  .in_mode   (rc6_in_mode),
    .key_we   (rc6_kwe),      .key_waddr (rc6_kaddr),   .key_wdata (rc6_kdata),
    .blk_valid (rc6_bvalid),  .blk_ready (rc6_bready),  .blk_data (rc6_bdata),
    .blk_mode  (rc6_bmode)
  );

  key_memory #(.WIDTH(32), .DEPTH(rc6_pkg::NWORDS)) u_rc6_keys (
    .clk, .rst_n, .we (rc6_kwe), .waddr (rc6_kaddr), .wdata (rc6_kdata), .keys (rc6_keys)
  );

  rc6_iterative u_rc6 (
    .clk, .rst_n,
    .blk_valid (rc6_bvalid), .blk_ready (rc6_bready), .blk_data (rc6_bdata),
    .blk_mode  (rc6_bmode),  .keys (rc6_keys),
    .res_valid (rc6_rvalid), .res_ready (rc6_rready), .res_data (rc6_rdata),
    .res_mode  (rc6_rmode)
  );

  output_interface #(.DATA_W(128)) u_rc6_out (
    .clk, .rst_n,
    .res_valid (rc6_rvalid), .res_ready (rc6_rready), .res_data (rc6_rdata),
    .res_mode  (rc6_rmode),
    .out_valid (rc6_out_valid), .out_ready (rc6_out_ready), .out_data (rc6_out_data),
    .out_mode  (rc6_out_mode)
  );

  // ------------------------------------------------------------ Rijndael, pipelined
  logic         rjp_kwe, rjp_bvalid, rjp_bready, rjp_bmode, rjp_rvalid, rjp_rready, rjp_rmode;
  logic [3:0]   rjp_kaddr;
  block_t       rjp_kdata, rjp_bdata, rjp_rdata;
  block_t       rjp_keys [NKEYS];

  input_interface #(.DATA_W(128), .KEY_W(128), .KADDR_W(4)) u_rjp_in (
    .clk, .rst_n,
    .in_valid (rjp_in_valid), .in_ready (rjp_in_ready), .in_is_key (rjp_in_is_key),
    .in_addr  (rjp_in_addr),  .in_data  (rjp_in_data),  .in_mode   (rjp_in_mode),
    .key_we   (rjp_kwe),      .key_waddr (rjp_kaddr),   .key_wdata (rjp_kdata),
    .blk_valid (rjp_bvalid),  .blk_ready (rjp_bready),  .blk_data (rjp_bdata),
    .blk_mode  (rjp_bmode)
  );

  key_memory #(.WIDTH(128), .DEPTH(NKEYS)) u_rjp_keys (
    .clk, .rst_n, .we (rjp_kwe), .waddr (rjp_kaddr), .wdata (rjp_kdata), .keys (rjp_keys)
  );

  rijndael_pipelined #(.INNER_STAGES(RJP_INNER_STAGES)) u_rjp (
    .clk, .rst_n,
    .blk_valid (rjp_bvalid), .blk_ready (rjp_bready), .blk_data (rjp_bdata),
    .blk_mode  (rjp_bmode),  .keys (rjp_keys),
    .res_valid (rjp_rvalid), .res_ready (rjp_rready), .res_data (rjp_rdata),
    .res_mode  (rjp_rmode)
  );

  output_interface #(.DATA_W(128)) u_rjp_out (
    .clk, .rst_n,
    .res_valid (rjp_rvalid), .res_ready (rjp_rready), .res_data (rjp_rdata),
    .res_mode  (rjp_rmode),
    .out_valid (rjp_out_valid), .out_ready (rjp_out_ready), .out_data (rjp_out_data),
    .out_mode  (rjp_out_mode)
  );

  // ------------------------------------------------------------ Serpent I8, iterative
  logic         spi_kwe, spi_bvalid, spi_bready, spi_bmode, spi_rvalid, spi_rready, spi_rmode;
  logic [5:0]   spi_kaddr;
  logic [127:0] spi_kdata;
  logic [127:0] spi_bdata, spi_rdata;
  serpent_pkg::words_t spi_keys [serpent_pkg::NKEYS];

  input_interface #(.DATA_W(128), .KEY_W(128), .KADDR_W(6)) u_spi_in (
    .clk, .rst_n,
    .in_valid (spi_in_valid), .in_ready (spi_in_ready), .in_is_key (spi_in_is_key),
    .in_addr  (spi_in_addr),  .in_data  (spi_in_data),  .in_mode   (spi_in_mode),
    .key_we   (spi_kwe),      .key_waddr (spi_kaddr),   .key_wdata (spi_kdata),
    .blk_valid (spi_bvalid),  .blk_ready (spi_bready),  .blk_data (spi_bdata),
    .blk_mode  (spi_bmode)
  );

  key_memory #(.WIDTH(128), .DEPTH(serpent_pkg::NKEYS)) u_spi_keys (
    .clk, .rst_n, .we (spi_kwe), .waddr (spi_kaddr), .wdata (spi_kdata), .keys (spi_keys)
  );

  serpent_i8 u_spi (
    .clk, .rst_n,
    .blk_valid (spi_bvalid), .blk_ready (spi_bready), .blk_data (spi_bdata),
    .blk_mode  (spi_bmode),  .keys (spi_keys),
    .res_valid (spi_rvalid), .res_ready (spi_rready), .res_data (spi_rdata),
    .res_mode  (spi_rmode)
  );

  output_interface #(.DATA_W(128)) u_spi_out (
    .clk, .rst_n,
    .res_valid (spi_rvalid), .res_ready (spi_rready), .res_data (spi_rdata),
    .res_mode  (spi_rmode),
    .out_valid (spi_out_valid), .out_ready (spi_out_ready), .out_data (spi_out_data),
    .out_mode  (spi_out_mode)
  );

  // ------------------------------------------------------------ Serpent, pipelined
  logic         spp_kwe, spp_bvalid, spp_bready, spp_bmode, spp_rvalid, spp_rready, spp_rmode;
  logic [5:0]   spp_kaddr;
  logic [127:0] spp_kdata;
  logic [127:0] spp_bdata, spp_rdata;
  serpent_pkg::words_t spp_keys [serpent_pkg::NKEYS];

  input_interface #(.DATA_W(128), .KEY_W(128), .KADDR_W(6)) u_spp_in (
    .clk, .rst_n,
    .in_valid (spp_in_valid), .in_ready (spp_in_ready), .in_is_key (spp_in_is_key),
    .in_addr  (spp_in_addr),  .in_data  (spp_in_data),  .in_mode   (spp_in_mode),
    .key_we   (spp_kwe),      .key_waddr (spp_kaddr),   .key_wdata (spp_kdata),
    .blk_valid (spp_bvalid),  .blk_ready (spp_bready),  .blk_data (spp_bdata),
    .blk_mode  (spp_bmode)
  );

  key_memory #(.WIDTH(128), .DEPTH(serpent_pkg::NKEYS)) u_spp_keys (
    .clk, .rst_n, .we (spp_kwe), .waddr (spp_kaddr), .wdata (spp_kdata), .keys (spp_keys)
  );

  serpent_pipelined #(.INNER_STAGES(SPP_INNER_STAGES)) u_spp (
    .clk, .rst_n,
    .blk_valid (spp_bvalid), .blk_ready (spp_bready), .blk_data (spp_bdata),
    .blk_mode  (spp_bmode),  .keys (spp_keys),
    .res_valid (spp_rvalid), .res_ready (spp_rready), .res_data (spp_rdata),
    .res_mode  (spp_rmode)
  );

  output_interface #(.DATA_W(128)) u_spp_out (
    .clk, .rst_n,
    .res_valid (spp_rvalid), .res_ready (spp_rready), .res_data (spp_rdata),
    .res_mode  (spp_rmode),
    .out_valid (spp_out_valid), .out_ready (spp_out_ready), .out_data (spp_out_data),
    .out_mode  (spp_out_mode)
  );

  // ------------------------------------------------------------ RC6, pipelined
  logic         rcp_kwe, rcp_bvalid, rcp_bready, rcp_bmode, rcp_rvalid, rcp_rready, rcp_rmode;
  logic [5:0]   rcp_kaddr;
  logic [31:0] rcp_kdata;
  logic [127:0] rcp_bdata, rcp_rdata;
  logic [31:0]  rcp_keys [rc6_pkg::NWORDS];

  input_interface #(.DATA_W(128), .KEY_W(32), .KADDR_W(6)) u_rcp_in (
    .clk, .rst_n,
    .in_valid (rcp_in_valid), .in_ready (rcp_in_ready), .in_is_key (rcp_in_is_key),
    .in_addr  (rcp_in_addr),  .in_data  (rcp_in_data),  .in_mode   (rcp_in_mode),
    .key_we   (rcp_kwe),      .key_waddr (rcp_kaddr),   .key_wdata (rcp_kdata),
    .blk_valid (rcp_bvalid),  .blk_ready (rcp_bready),  .blk_data (rcp_bdata),
    .blk_mode  (rcp_bmode)
  );

  key_memory #(.WIDTH(32), .DEPTH(rc6_pkg::NWORDS)) u_rcp_keys (
    .clk, .rst_n, .we (rcp_kwe), .waddr (rcp_kaddr), .wdata (rcp_kdata), .keys (rcp_keys)
  );

  rc6_pipelined #(.INNER_STAGES(RCP_INNER_STAGES)) u_rcp (
    .clk, .rst_n,
    .blk_valid (rcp_bvalid), .blk_ready (rcp_bready), .blk_data (rcp_bdata),
    .blk_mode  (rcp_bmode),  .keys (rcp_keys),
    .res_valid (rcp_rvalid), .res_ready (rcp_rready), .res_data (rcp_rdata),
    .res_mode  (rcp_rmode)
  );

  output_interface #(.DATA_W(128)) u_rcp_out (
    .clk, .rst_n,
    .res_valid (rcp_rvalid), .res_ready (rcp_rready), .res_data (rcp_rdata),
    .res_mode  (rcp_rmode),
    .out_valid (rcp_out_valid), .out_ready (rcp_out_ready), .out_data (rcp_out_data),
    .out_mode  (rcp_out_mode)
  );

  // ------------------------------------------------------------ Twofish, iterative
  logic         twf_kwe, twf_bvalid, twf_bready, twf_bmode, twf_rvalid, twf_rready, twf_rmode;
  logic [5:0]   twf_kaddr;
  logic [31:0]  twf_kdata;
  logic [127:0] twf_bdata, twf_rdata;
  logic [31:0]  twf_keys [twofish_pkg::NWORDS];

  input_interface #(.DATA_W(128), .KEY_W(32), .KADDR_W(6)) u_twf_in (
    .clk, .rst_n,
    .in_valid (twf_in_valid), .in_ready (twf_in_ready), .in_is_key (twf_in_is_key),
    .in_addr  (twf_in_addr),  .in_data  (twf_in_data),  .in_mode   (twf_in_mode),
    .key_we   (twf_kwe),      .key_waddr (twf_kaddr),   .key_wdata (twf_kdata),
    .blk_valid (twf_bvalid),  .blk_ready (twf_bready),  .blk_data (twf_bdata),
    .blk_mode  (twf_bmode)
  );

  key_memory #(.WIDTH(32), .DEPTH(twofish_pkg::NWORDS)) u_twf_keys (
    .clk, .rst_n, .we (twf_kwe), .waddr (twf_kaddr), .wdata (twf_kdata), .keys (twf_keys)
  );

  twofish_iterative u_twf (
    .clk, .rst_n,
    .blk_valid (twf_bvalid), .blk_ready (twf_bready), .blk_data (twf_bdata),
    .blk_mode  (twf_bmode),  .keys (twf_keys),
    .res_valid (twf_rvalid), .res_ready (twf_rready), .res_data (twf_rdata),
    .res_mode  (twf_rmode)
  );

  output_interface #(.DATA_W(128)) u_twf_out (
    .clk, .rst_n,
    .res_valid (twf_rvalid), .res_ready (twf_rready), .res_data (twf_rdata),
    .res_mode  (twf_rmode),
    .out_valid (twf_out_valid), .out_ready (twf_out_ready), .out_data (twf_out_data),
    .out_mode  (twf_out_mode)
  );

  // ------------------------------------------------------------ Twofish, full mixed pipelining
  logic         twp_kwe, twp_bvalid, twp_bready, twp_bmode, twp_rvalid, twp_rready, twp_rmode;
  logic [5:0]   twp_kaddr;
  logic [31:0]  twp_kdata;
  logic [127:0] twp_bdata, twp_rdata;
  logic [31:0]  twp_keys [twofish_pkg::NWORDS];

  input_interface #(.DATA_W(128), .KEY_W(32), .KADDR_W(6)) u_twp_in (
    .clk, .rst_n,
    .in_valid (twp_in_valid), .in_ready (twp_in_ready), .in_is_key (twp_in_is_key),
    .in_addr  (twp_in_addr),  .in_data  (twp_in_data),  .in_mode   (twp_in_mode),
    .key_we   (twp_kwe),      .key_waddr (twp_kaddr),   .key_wdata (twp_kdata),
    .blk_valid (twp_bvalid),  .blk_ready (twp_bready),  .blk_data (twp_bdata),
    .blk_mode  (twp_bmode)
  );

  key_memory #(.WIDTH(32), .DEPTH(twofish_pkg::NWORDS)) u_twp_keys (
    .clk, .rst_n, .we (twp_kwe), .waddr (twp_kaddr), .wdata (twp_kdata), .keys (twp_keys)
  );

  twofish_pipelined #(.INNER_STAGES(TWP_INNER_STAGES)) u_twp (
    .clk, .rst_n,
    .blk_valid (twp_bvalid), .blk_ready (twp_bready), .blk_data (twp_bdata),
    .blk_mode  (twp_bmode),  .keys (twp_keys),
    .res_valid (twp_rvalid), .res_ready (twp_rready), .res_data (twp_rdata),
    .res_mode  (twp_rmode)
  );

  output_interface #(.DATA_W(128)) u_twp_out (
    .clk, .rst_n,
    .res_valid (twp_rvalid), .res_ready (twp_rready), .res_data (twp_rdata),
    .res_mode  (twp_rmode),
    .out_valid (twp_out_valid), .out_ready (twp_out_ready), .out_data (twp_out_data),
    .out_mode  (twp_out_mode)
  );

endmodule
