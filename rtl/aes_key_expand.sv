// aes_key_expand: iterative AES-128 key schedule with a round-key store.
//
// A pulse on start with a cipher key loads it as RoundKey 0 and then derives
// one further round key per clock (the Rijndael schedule, rcon generated by
// repeated doubling), so all 11 round keys are held after 10 more cycles,
// when done pulses for one cycle. busy is high during those 10 cycles;
// rk_valid stays high from done until the next start. The engine reads a
// round key combinationally through rd_idx/rd_key, which lets the
// encryption core walk forwards and the decryption core backwards through
// the same store.
//
// The document names Key Expansion as the block that feeds RoundKey 0..10 to
// the rounds; computing the round keys once per key update and keeping them
// in registers is this design's choice. It suits the key update scheme: a new
// key costs 11 cycles, and the round keys then serve UP blocks.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,      // load key and begin expansion
  input  block_t      key,
  output logic        busy,
  output logic        done,       // one-cycle pulse: all round keys ready
  output logic        rk_valid,
  input  logic [3:0]  rd_idx,     // 0..10
  output block_t      rd_key
);

  block_t      rk [0:NR];
  logic [3:0]  cnt;               // index of the next round key to derive
  byte_t       rcon;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      rk_valid <= 1'b0;
      cnt      <= '0;
      rcon     <= 8'h01;
      for (int i = 0; i <= NR; i++) rk[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rk[0]    <= key;
        cnt      <= 4'd1;
        rcon     <= 8'h01;
        busy     <= 1'b1;
        rk_valid <= 1'b0;
      end else if (busy) begin
        rk[cnt] <= next_round_key(rk[cnt - 4'd1], rcon);
        rcon    <= xtime(rcon);
        if (cnt == 4'(NR)) begin
          busy     <= 1'b0;
          done     <= 1'b1;
          rk_valid <= 1'b1;
        end else begin
          cnt <= cnt + 4'd1;
        end
      end
    end
  end

  assign rd_key = (rd_idx <= 4'(NR)) ? rk[rd_idx] : '0;

endmodule
