// tb_key_update_system_full: the evaluated configuration, at the top's
// default parameters.
//
// Four keys (the TPM model is preset to generate the four keys of the
// evaluation), UP = 3000 and 30000 encryptions, as in the experiment: the
// 1st key must serve blocks 1-3000, 12001-15000 and 24001-27000, i.e.
// 9000, 9000, 6000 and 6000 blocks under keys 1 to 4. Every ciphertext is
// checked against the reference AES and every block must come back from the
// receiver unchanged; the shared checks and mechanism counts are those of
// the short end-to-end test.
module tb_key_update_system_full;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 4, UP_W = 16, KW = 2;
  localparam int unsigned UPV = 3000, NBLK = 30000;
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

  key_update_system dut (.*);
  tpm_model #(.PRESET(1)) tpm (.spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

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

  final begin
    $display("evaluated split: %0d %0d %0d %0d", per_key[0], per_key[1], per_key[2], per_key[3]);
  end

  initial begin
    wait (rx_list_ready);
    check("1st key as evaluated", tpm.nvm[0] == 128'h1D22BF01AC77D921EA3415F5368910A2);
    check("4th key as evaluated", tpm.nvm[3] == 128'h2B7E151628AED2A6ABF7158809CF4F3C);
    wait (nout == NBLK);
    check("9000/9000/6000/6000 blocks under keys 1-4",
          per_key[0] == 9000 && per_key[1] == 9000 && per_key[2] == 6000 && per_key[3] == 6000);
  end
endmodule
