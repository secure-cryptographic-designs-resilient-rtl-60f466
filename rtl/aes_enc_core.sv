// aes_enc_core: iterative AES-128 encryption engine, one round per clock.
//
// The structure follows the AES-128 encryption flow: AddRoundKey with
// RoundKey 0, nine rounds of SubBytes, ShiftRows, MixColumns and AddRoundKey,
// and a final round without MixColumns. Here the initial AddRoundKey is done
// in the cycle a block is accepted, and one full round is computed in each
// of the next 10 cycles, so the ciphertext appears 11 clocks after the
// accepting edge. A single 128-bit state register is reused by all rounds;
// this iterative organisation is this design's choice (the document fixes
// only the algorithm).
//
// Interface: in_valid/in_ready accept a plaintext block; out_valid/out_ready
// hand over the ciphertext, which is held until taken. The round keys come
// from an external store through rk_idx/rk (see aes_key_expand): rk_idx is
// the round whose key is needed in the current cycle.
module aes_enc_core
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_data,     // plaintext
  output logic        out_valid,
  input  logic        out_ready,
  output block_t      out_data,    // ciphertext
  output logic [3:0]  rk_idx,
  input  block_t      rk,
  output logic        busy         // a block is in the engine or waiting at the output
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;
  state_e      st;
  block_t      state;
  logic [3:0]  round;

  block_t round_out;
  always_comb begin
    block_t t;
    t = shift_rows(sub_bytes(state));
    if (round != 4'(NR)) t = mix_columns(t);
    round_out = t ^ rk;
  end

  assign rk_idx    = (st == S_RUN) ? round : 4'd0;
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
          state <= in_data ^ rk;          // rk_idx is 0 here
          round <= 4'd1;
          st    <= S_RUN;
        end
        S_RUN: begin
          state <= round_out;
          if (round == 4'(NR)) st <= S_DONE;
          else                 round <= round + 4'd1;
        end
        S_DONE: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
