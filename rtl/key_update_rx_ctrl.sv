// key_update_rx_ctrl: receiver-side controller of the key update scheme.
//
// It mirrors the sender: it waits until every entry of the key list has
// arrived on the share port (the entries are written into the key list
// memory by the enclosing block) and the update period UP has arrived, then
// loads the first key, starts its expansion and lets ciphertext into the
// decryption engine while the decryption counter DCT is below UP. When DCT
// reaches UP and the last block has left the engine, the key index advances
// in loop order, DCT restarts at 0 and the next key is loaded from the key
// list memory (one read cycle, then the 11-cycle expansion, during which the
// engine is stalled). Because both sides count whole blocks, the receiver
// stays on the sender's key as long as no block is lost between them.
//
// The counter and the loop order follow the scheme; the sequencing and the
// handshakes are this design's choices. An UP of 0 is treated as 1.
module key_update_rx_ctrl
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
  input  logic            up_valid,
  input  logic [UP_W-1:0] up_value,
  // key list memory read port
  output logic            ram_rd_en,
  output logic [KW-1:0]   ram_raddr,
  // key expansion
  output logic            ke_start,
  input  logic            ke_done,
  // decryption engine
  input  logic            dec_accept,
  input  logic            dec_busy,
  output logic            run,
  // status
  output logic            list_ready,  // whole key list and UP received
  output logic [KW-1:0]   key_idx,
  output logic [UP_W-1:0] dct,
  output logic            key_update
);

  typedef enum logic [2:0] {S_WAIT, S_READ, S_START, S_EXPAND, S_RUN} state_e;
  state_e          st;
  logic [NUM_KEYS-1:0] got;
  logic            got_up;
  logic [UP_W-1:0] up_r;

  function automatic logic [KW-1:0] next_idx(input logic [KW-1:0] k);
    return (k == KW'(NUM_KEYS - 1)) ? '0 : k + KW'(1);
  endfunction

  assign list_ready = (&got) && got_up;
  assign ram_rd_en  = (st == S_READ);
  assign ram_raddr  = key_idx;
  assign ke_start   = (st == S_START);
  assign run        = (st == S_RUN) && (dct < up_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_WAIT;
      got        <= '0;
      got_up     <= 1'b0;
      up_r       <= '0;
      key_idx    <= '0;
      dct        <= '0;
      key_update <= 1'b0;
    end else begin
      key_update <= 1'b0;
      if (share_valid) got[share_idx] <= 1'b1;
      if (up_valid) begin
        got_up <= 1'b1;
        up_r   <= (up_value == '0) ? UP_W'(1) : up_value;
      end
      unique case (st)
        S_WAIT:  if (list_ready) begin
          key_idx <= '0;
          st      <= S_READ;
        end
        S_READ:  st <= S_START;           // memory output valid next cycle
        S_START:  st <= S_EXPAND;        // key at the memory output: expand it
        S_EXPAND: if (ke_done) begin
          dct <= '0;
          st  <= S_RUN;
        end
        S_RUN: begin
          if (dec_accept) dct <= dct + UP_W'(1);
          else if (dct >= up_r && !dec_busy) begin
            key_idx    <= next_idx(key_idx);
            key_update <= 1'b1;
            st         <= S_READ;
          end
        end
        default: st <= S_WAIT;
      endcase
    end
  end

  a_accept_in_run: assert property (@(posedge clk) disable iff (!rst_n) dec_accept |-> run);

endmodule
