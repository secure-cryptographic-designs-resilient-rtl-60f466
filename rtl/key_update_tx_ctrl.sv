// key_update_tx_ctrl: sender-side controller of the key update scheme.
//
// After start it walks the sender flow of the scheme:
//   1. GEN    - has the TPM generate NUM_KEYS random keys into slots
//               0..NUM_KEYS-1 (one generate frame per key);
//   2. SHARE  - reads each key back and hands it to the receiver on the
//               share port (share_valid pulse with slot index and key);
//   3. UP     - latches the update period UP and hands it to the receiver
//               (up_valid pulse);
//   4. FETCH  - reads the current key from the TPM and starts the key
//               expansion; the engine is stalled until it is done;
//   5. RUN    - lets plaintext into the engine while the encryption counter
//               ECT is below UP, counting each accepted block. When ECT
//               reaches UP and the last block has left the engine, the key
//               index advances in loop order (after the last key comes the
//               first again), ECT restarts at 0 and the flow returns to FETCH.
// Keys never stay on the FPGA fabric beyond the round-key store: each key
// update fetches the next key from the TPM again.
//
// The flow, the counter and the loop order follow the scheme; the
// step-by-step sequencing, the handshakes, and reading the key back from the
// TPM at every update are this design's choices. An UP of 0 is treated as 1.
module key_update_tx_ctrl
  import aes_pkg::*;
  import key_update_pkg::*;
#(
  parameter int unsigned NUM_KEYS = 4,
  parameter int unsigned UP_W     = 16,
  localparam int unsigned KW      = (NUM_KEYS > 1) ? $clog2(NUM_KEYS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [UP_W-1:0] up,
  // TPM client
  output logic            tpm_req_valid,
  input  logic            tpm_req_ready,
  output tpm_op_e         tpm_req_op,
  output logic [15:0]     tpm_req_slot,
  input  logic            tpm_rsp_valid,
  input  block_t          tpm_rsp_key,
  // to the receiver
  output logic            share_valid,
  output logic [KW-1:0]   share_idx,
  output block_t          share_key,
  output logic            up_valid,
  output logic [UP_W-1:0] up_value,
  // key expansion
  output logic            ke_start,
  output block_t          ke_key,
  input  logic            ke_done,
  // encryption engine
  input  logic            enc_accept,  // a block entered the engine this cycle
  input  logic            enc_busy,
  output logic            run,         // the engine may accept plaintext
  // status
  output logic [KW-1:0]   key_idx,
  output logic [UP_W-1:0] ect,
  output logic            key_update   // one-cycle pulse when the key index advances
);

  typedef enum logic [3:0] {
    S_IDLE, S_GEN, S_GEN_W, S_SHARE, S_SHARE_W, S_UP,
    S_FETCH, S_FETCH_W, S_EXPAND, S_RUN
  } state_e;
  state_e          st;
  logic [KW-1:0]   i;
  logic [UP_W-1:0] up_r;

  function automatic logic [KW-1:0] next_idx(input logic [KW-1:0] k);
    return (k == KW'(NUM_KEYS - 1)) ? '0 : k + KW'(1);
  endfunction

  assign tpm_req_valid = (st == S_GEN) || (st == S_SHARE) || (st == S_FETCH);
  assign tpm_req_op    = (st == S_GEN) ? TPM_GEN : TPM_READ;
  assign tpm_req_slot  = 16'((st == S_FETCH) ? key_idx : i);
  assign share_key     = tpm_rsp_key;
  assign share_idx     = i;
  assign up_value      = up_r;
  assign ke_key        = tpm_rsp_key;
  assign run           = (st == S_RUN) && (ect < up_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      i           <= '0;
      up_r        <= '0;
      key_idx     <= '0;
      ect         <= '0;
      share_valid <= 1'b0;
      up_valid    <= 1'b0;
      ke_start    <= 1'b0;
      key_update  <= 1'b0;
    end else begin
      share_valid <= 1'b0;
      up_valid    <= 1'b0;
      ke_start    <= 1'b0;
      key_update  <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          i       <= '0;
          key_idx <= '0;
          ect     <= '0;
          up_r    <= (up == '0) ? UP_W'(1) : up;
          st      <= S_GEN;
        end
        S_GEN:   if (tpm_req_ready) st <= S_GEN_W;
        S_GEN_W: if (tpm_rsp_valid) begin
          if (i == KW'(NUM_KEYS - 1)) begin
            i  <= '0;
            st <= S_SHARE;
          end else begin
            i  <= i + KW'(1);
            st <= S_GEN;
          end
        end
        S_SHARE:   if (tpm_req_ready) st <= S_SHARE_W;
        S_SHARE_W: if (tpm_rsp_valid) begin
          share_valid <= 1'b1;     // share_idx (= i) and share_key stay valid this cycle
          st          <= S_UP;
        end
        S_UP: begin
          if (i == KW'(NUM_KEYS - 1)) begin
            up_valid <= 1'b1;
            st       <= S_FETCH;
          end else begin
            st <= S_SHARE;
          end
          i <= (i == KW'(NUM_KEYS - 1)) ? '0 : i + KW'(1);
        end
        S_FETCH:   if (tpm_req_ready) st <= S_FETCH_W;
        S_FETCH_W: if (tpm_rsp_valid) begin
          ke_start <= 1'b1;
          st       <= S_EXPAND;
        end
        S_EXPAND: if (ke_done) begin
          ect <= '0;
          st  <= S_RUN;
        end
        S_RUN: begin
          if (enc_accept) ect <= ect + UP_W'(1);
          else if (ect >= up_r && !enc_busy) begin
            key_idx    <= next_idx(key_idx);
            key_update <= 1'b1;
            st         <= S_FETCH;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the engine is only fed while the controller allows it
  a_accept_in_run: assert property (@(posedge clk) disable iff (!rst_n) enc_accept |-> run);

endmodule
