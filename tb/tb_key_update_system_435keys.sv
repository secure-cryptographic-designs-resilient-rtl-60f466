// tb_key_update_system_435keys: end-to-end test with the longest key list
// the TPM's non-volatile store holds, 435 AES-128 keys.
//
// With more than 256 keys the TPM frames carry a two-byte slot number.
// NUM_KEYS = 435, UP = 4, 3600 random blocks with random gaps and
// back-pressure, so every key is fetched and the list wraps twice. The
// checks and mechanism counts are those of tb_key_update_system: every
// ciphertext against the reference AES under key (block / UP) mod 435 of the
// TPM store, every plaintext recovered in order, the TPM generating all 435
// keys, and the per-key block counts.
module tb_key_update_system_435keys;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 435, UP_W = 16, KW = 9;
  localparam int unsigned UPV = 4, NBLK = 3600;
  localparam int unsigned WATCHDOG = 3000000;

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
  tpm_model #(.SLOT_BYTES(2)) tpm (.spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

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

  initial begin
    wait (rx_list_ready);
    check("keys in slots above 255 generated", tpm.nvm[300] != '0 && tpm.nvm[434] != '0);
    check("no key past the list", tpm.nvm[435] == '0);
  end
endmodule
