// aes_dec_core: iterative AES-128 decryption engine (inverse cipher), one
// round per clock.
//
// The receiver of the key update scheme decrypts with the same key list as
// the sender. This core runs the FIPS-197 inverse cipher: AddRoundKey with
// RoundKey 10 in the accepting cycle, then for rounds 9 down to 1
// InvShiftRows, InvSubBytes, AddRoundKey and InvMixColumns, and a final
// round with RoundKey 0 and no InvMixColumns. The plaintext appears 11
// clocks after the accepting edge. The iterative organisation and the
// handshake are this design's choice; the document fixes only that the
// receiver decrypts with the shared keys.
//
// Interface: in_valid/in_ready accept a ciphertext block; out_valid/out_ready
// hand over the plaintext, held until taken. Round keys are read from an
// external store through rk_idx/rk, walking from 10 down to 0.
module aes_dec_core
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_data,     // ciphertext
  output logic        out_valid,
  input  logic        out_ready,
  output block_t      out_data,    // plaintext
  output logic [3:0]  rk_idx,
  input  block_t      rk,
  output logic        busy
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e      st;
  block_t      state;
  logic [3:0]  round;              // round key used in this cycle

  block_t round_out;
  always_comb begin
    block_t t;
    t = inv_sub_bytes(inv_shift_rows(state)) ^ rk;
    if (round != 4'd0) t = inv_mix_columns(t);
    round_out = t;
  end

  assign rk_idx    = (st == S_RUN) ? round : 4'(NR);
  assign in_ready  = (st == S_IDLE);
  assign out_valid = (st == S_DONE);
  assign out_data  = state;
  assign busy      = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      state <= '0;
      round <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          state <= in_data ^ rk;          // rk_idx is 10 here
          round <= 4'(NR - 1);
          st    <= S_RUN;
        end
        S_RUN: begin
          state <= round_out;
          if (round == 4'd0) st <= S_DONE;
          else               round <= round - 4'd1;
        end
        S_DONE: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
