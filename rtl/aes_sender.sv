// aes_sender: the sender side of the key update scheme on the FPGA fabric.
//
// It joins the controller, the AES-128 encryption engine with its round-key
// store, and the SPI link to the TPM that generates and keeps the keys.
// After start, the controller has the TPM generate the key list, shares the
// list and UP with the receiver, and then encrypts blocks, moving to the
// next key of the list after every UP blocks (see key_update_tx_ctrl).
//
// Data ports: pt_valid/pt_ready/pt_data take plaintext, ct_valid/ct_ready/
// ct_data give ciphertext; a block takes 11 clocks through the engine and
// one more to leave it. pt_ready is low while a key is being fetched and
// expanded (a read frame of 18 SPI bytes plus 11 clocks), while a block is
// in the engine, and once UP blocks have been taken with the current key.
// Status outputs show the current key index and the encryption counter ECT.
// A list of more than 256 keys switches the TPM frames to two slot bytes.
module aes_sender
  import aes_pkg::*;
  import key_update_pkg::*;
#(
  parameter int unsigned NUM_KEYS = 4,
  parameter int unsigned UP_W     = 16,
  parameter int unsigned SPI_HALF = 2,
  localparam int unsigned KW      = (NUM_KEYS > 1) ? $clog2(NUM_KEYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [UP_W-1:0] up,
  input  logic            pt_valid,
  output logic            pt_ready,
  input  block_t          pt_data,
  output logic            ct_valid,
  input  logic            ct_ready,
  output block_t          ct_data,
  // key list and UP to the receiver
  output logic            share_valid,
  output logic [KW-1:0]   share_idx,
  output block_t          share_key,
  output logic            up_valid,
  output logic [UP_W-1:0] up_value,
  // SPI to the TPM
  output logic            spi_cs_n,
  output logic            spi_sclk,
  output logic            spi_mosi,
  input  logic            spi_miso,
  // status
  output logic [KW-1:0]   key_idx,
  output logic [UP_W-1:0] ect,
  output logic            key_update
);

  logic       tpm_req_valid, tpm_req_ready, tpm_rsp_valid;
  tpm_op_e    tpm_req_op;
  logic [15:0] tpm_req_slot;
  block_t     tpm_rsp_key;
  logic       ke_start, ke_done, ke_busy, ke_rk_valid;
  block_t     ke_key, rk;
  logic [3:0] rk_idx;
  logic       run, enc_in_ready, enc_busy, enc_accept;

  tpm_client #(.HALF(SPI_HALF), .SLOT_BYTES((NUM_KEYS > 256) ? 2 : 1)) u_tpm (
    .clk, .rst_n,
    .req_valid(tpm_req_valid), .req_ready(tpm_req_ready), .req_op(tpm_req_op),
    .req_slot(tpm_req_slot), .rsp_valid(tpm_rsp_valid), .rsp_key(tpm_rsp_key),
    .spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso
  );

  key_update_tx_ctrl #(.NUM_KEYS(NUM_KEYS), .UP_W(UP_W)) u_ctrl (
    .clk, .rst_n, .start, .up,
    .tpm_req_valid, .tpm_req_ready, .tpm_req_op, .tpm_req_slot,
    .tpm_rsp_valid, .tpm_rsp_key,
    .share_valid, .share_idx, .share_key, .up_valid, .up_value,
    .ke_start, .ke_key, .ke_done,
    .enc_accept, .enc_busy, .run,
    .key_idx, .ect, .key_update
  );

  aes_key_expand u_ke (
    .clk, .rst_n, .start(ke_start), .key(ke_key), .busy(ke_busy), .done(ke_done),
    .rk_valid(ke_rk_valid), .rd_idx(rk_idx), .rd_key(rk)
  );

  assign pt_ready   = run && enc_in_ready;
  assign enc_accept = pt_valid && pt_ready;

  aes_enc_core u_enc (
    .clk, .rst_n,
    .in_valid(pt_valid && run), .in_ready(enc_in_ready), .in_data(pt_data),
    .out_valid(ct_valid), .out_ready(ct_ready), .out_data(ct_data),
    .rk_idx, .rk, .busy(enc_busy)
  );

  a_keys_ready: assert property (@(posedge clk) disable iff (!rst_n) enc_accept |-> ke_rk_valid && !ke_busy);

endmodule
