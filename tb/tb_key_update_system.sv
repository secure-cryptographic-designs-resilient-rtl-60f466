// tb_key_update_system: end-to-end test of sender, link and receiver with the
// TPM model, at a short update period.
//
// 4-key list (the default), UP = 5, 220 random blocks with random input gaps
// and random back-pressure at the plaintext output. Every block is checked
// twice: the ciphertext on the link must equal the reference AES under key
// (block / UP) mod 4 of the TPM store, and the receiver must return the
// original plaintext, in order. Mechanisms counted, each of which must occur:
// key generation frames, key-list sharing, sender and receiver key updates,
// wrap from the last key back to the first, plaintext stall during a key
// change, link back-pressure (receiver not ready), and output back-pressure.
module tb_key_update_system;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 4, UP_W = 16, KW = 2;
  localparam int unsigned UPV = 5, NBLK = 220;
  localparam int unsigned WATCHDOG = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [UP_W-1:0] up = '0;
  logic pt_in_valid = 1'b0, pt_in_ready, pt_out_valid, pt_out_ready = 1'b0;
  block_t pt_in_data = '0, pt_out_data, link_data;
  logic link_fire;
  logic spi_cs_n, spi_sclk, spi_mosi, spi_miso;
  logic rx_list_ready, tx_key_update, rx_key_update;
  logic [KW-1:0] tx_key_idx, rx_key_idx;
  logic [UP_W-1:0] ect, dct;
  int checks = 0, failures = 0;

  key_update_system #(.NUM_KEYS(N), .UP_W(UP_W), .SPI_HALF(2)) dut (.*);
  tpm_model tpm (.spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

  `include "tb_key_update_body.svh"

  initial begin
    wait (body_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
