// tb_key_update_system_8keys: end-to-end test with an 8-key list, the list
// size generated on the TPM in the key generation experiment.
//
// The TPM model generates the eight keys printed by a key generation run on
// the TPM, in that order. NUM_KEYS = 8, UP = 7, 150 random blocks with random gaps and back-pressure,
// so the list wraps twice. The checks and mechanism counts are those of
// tb_key_update_system: every ciphertext against the reference AES under key
// (block / UP) mod 8 of the TPM store, every plaintext recovered in order,
// the TPM generating all 8 keys, and the per-key block counts.
module tb_key_update_system_8keys;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 8, UP_W = 16, KW = 3;
  localparam int unsigned UPV = 7, NBLK = 150;
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
  tpm_model #(.PRESET(2)) tpm (.spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

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
    check("1st generated key", tpm.nvm[0] == 128'h77D809A16E13C11613F6A2F3F57D3ADD);
    check("8th generated key", tpm.nvm[7] == 128'hB7B33CEC5BE58D46680FADEC6413AF40);
  end
endmodule
