// key_update_system: sender and receiver of the AES-128 key update scheme
// against correlation power and EM analysis.
//
// A correlation attack needs a minimum number of traces recorded under one
// key (LNTS) before that key falls. The scheme therefore changes the AES key
// after every UP encryptions, with UP chosen below LNTS, cycling through a
// list of random keys made and kept by a TPM. The sender (aes_sender) has the
// TPM generate the list over SPI, shares the list and UP with the receiver,
// and encrypts; the receiver (aes_receiver) decrypts the ciphertext stream,
// changing key after the same number of blocks. This top joins the two
// through the three channels of the scheme: key list, UP and encrypted data.
// The TPM itself is an external chip; its SPI pins are ports here.
//
// Interface: pulse start with UP on up to begin (key generation, sharing,
// first key fetch). Then plaintext goes in at pt_in_*, the ciphertext passes
// from sender to receiver (visible on link_fire/link_data) and the recovered
// plaintext leaves at pt_out_*. Each block costs about 12 clocks in each
// engine; each key change costs an 18-byte SPI read on the sender plus the
// 11-clock key expansion on both sides.
//
// NUM_KEYS = 4 and UP = 3000 match the evaluated configuration; the SPI
// clock divider, the counter width and all handshakes are this design's
// choices.
module key_update_system
  import aes_pkg::*;
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
  input  logic            pt_in_valid,
  output logic            pt_in_ready,
  input  block_t          pt_in_data,
  output logic            pt_out_valid,
  input  logic            pt_out_ready,
  output block_t          pt_out_data,
  // ciphertext on the link between sender and receiver
  output logic            link_fire,
  output block_t          link_data,
  // SPI to the TPM
  output logic            spi_cs_n,
  output logic            spi_sclk,
  output logic            spi_mosi,
  input  logic            spi_miso,
  // status
  output logic            rx_list_ready,
  output logic [KW-1:0]   tx_key_idx,
  output logic [KW-1:0]   rx_key_idx,
  output logic [UP_W-1:0] ect,
  output logic [UP_W-1:0] dct,
  output logic            tx_key_update,
  output logic            rx_key_update
);

  logic            share_valid, up_valid;
  logic [KW-1:0]   share_idx;
  block_t          share_key;
  logic [UP_W-1:0] up_value;
  logic            ct_valid, ct_ready;
  block_t          ct_data;

  aes_sender #(.NUM_KEYS(NUM_KEYS), .UP_W(UP_W), .SPI_HALF(SPI_HALF)) u_tx (
    .clk, .rst_n, .start, .up,
    .pt_valid(pt_in_valid), .pt_ready(pt_in_ready), .pt_data(pt_in_data),
    .ct_valid, .ct_ready, .ct_data,
    .share_valid, .share_idx, .share_key, .up_valid, .up_value,
    .spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso,
    .key_idx(tx_key_idx), .ect, .key_update(tx_key_update)
  );

  aes_receiver #(.NUM_KEYS(NUM_KEYS), .UP_W(UP_W)) u_rx (
    .clk, .rst_n, .share_valid, .share_idx, .share_key, .up_valid, .up_value,
    .ct_valid, .ct_ready, .ct_data,
    .pt_valid(pt_out_valid), .pt_ready(pt_out_ready), .pt_data(pt_out_data),
    .list_ready(rx_list_ready), .key_idx(rx_key_idx), .dct, .key_update(rx_key_update)
  );

  assign link_fire = ct_valid && ct_ready;
  assign link_data = ct_data;

endmodule
