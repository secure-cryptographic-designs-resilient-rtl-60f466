// aes_receiver: the receiver side of the key update scheme.
//
// It stores the key list and the update period UP shared by the sender,
// then decrypts ciphertext with the keys in list order, moving to the next
// key after every UP blocks, exactly as the sender moves after every UP
// encryptions (see key_update_rx_ctrl). It holds a key list memory, the
// controller with the decryption counter DCT, the round-key store and the
// AES-128 decryption engine.
//
// share_valid/share_idx/share_key write one entry of the key list per pulse;
// up_valid/up_value set UP. Decryption starts once all NUM_KEYS entries and
// UP are in. ct_valid/ct_ready/ct_data take ciphertext, pt_valid/pt_ready/
// pt_data give plaintext, 11 clocks after a block is accepted. ct_ready is
// low during a key change (1 memory read cycle, 1 start cycle and 11
// expansion cycles) and while a block is in the engine.
module aes_receiver
  import aes_pkg::*;
#(
  parameter int unsigned NUM_KEYS = 4,
  parameter int unsigned UP_W     = 16,
  localparam int unsigned KW      = (NUM_KEYS > 1) ? $clog2(NUM_KEYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            share_valid,
  input  logic [KW-1:0]   share_idx,
  input  block_t          share_key,
  input  logic            up_valid,
  input  logic [UP_W-1:0] up_value,
  input  logic            ct_valid,
  output logic            ct_ready,
  input  block_t          ct_data,
  output logic            pt_valid,
  input  logic            pt_ready,
  output block_t          pt_data,
  // status
  output logic            list_ready,
  output logic [KW-1:0]   key_idx,
  output logic [UP_W-1:0] dct,
  output logic            key_update
);

  logic          ram_rd_en;
  logic [KW-1:0] ram_raddr;
  block_t        ram_rd_data, rk;
  logic          ke_start, ke_done, ke_busy, ke_rk_valid;
  logic [3:0]    rk_idx;
  logic          run, dec_in_ready, dec_busy, dec_accept;

  key_list_ram #(.NUM_KEYS(NUM_KEYS)) u_ram (
    .clk, .we(share_valid), .waddr(share_idx), .wdata(share_key),
    .rd_en(ram_rd_en), .raddr(ram_raddr), .rd_data(ram_rd_data)
  );

  key_update_rx_ctrl #(.NUM_KEYS(NUM_KEYS), .UP_W(UP_W)) u_ctrl (
    .clk, .rst_n, .share_valid, .share_idx, .up_valid, .up_value,
    .ram_rd_en, .ram_raddr, .ke_start, .ke_done,
    .dec_accept, .dec_busy, .run,
    .list_ready, .key_idx, .dct, .key_update
  );

  aes_key_expand u_ke (
    .clk, .rst_n, .start(ke_start), .key(ram_rd_data), .busy(ke_busy), .done(ke_done),
    .rk_valid(ke_rk_valid), .rd_idx(rk_idx), .rd_key(rk)
  );

  assign ct_ready   = run && dec_in_ready;
  assign dec_accept = ct_valid && ct_ready;

  aes_dec_core u_dec (
    .clk, .rst_n,
    .in_valid(ct_valid && run), .in_ready(dec_in_ready), .in_data(ct_data),
    .out_valid(pt_valid), .out_ready(pt_ready), .out_data(pt_data),
    .rk_idx, .rk, .busy(dec_busy)
  );

  a_keys_ready: assert property (@(posedge clk) disable iff (!rst_n) dec_accept |-> ke_rk_valid && !ke_busy);

endmodule
