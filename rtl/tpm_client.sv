// tpm_client: issues key generation and key read commands to the TPM over
// SPI.
//
// In the key update scheme every key is generated by the TPM's true random
// number generator and kept in its non-volatile memory; the FPGA fabric only
// asks for a key when it needs one. This block turns a request (op, slot)
// into one SPI frame: chip select low, the command byte, the slot number
// (SLOT_BYTES bytes, most significant first) and, for TPM_READ, 16 dummy
// bytes during which the TPM returns the key, byte 0 first. Chip select then rises and rsp_valid pulses for one cycle (with the
// key for a read). req_ready is high while no frame is in flight.
//
// SLOT_BYTES is 1 for lists of up to 256 keys and 2 for longer ones. A
// generate frame takes 1+SLOT_BYTES bytes, a read 17+SLOT_BYTES bytes, each
// 16*HALF+2 clocks, plus 2 clocks of chip-select set-up: with one slot byte,
// from the request edge to rsp_valid 2 + 2*(16*HALF+2) or 2 + 18*(16*HALF+2)
// clocks. The frame format is this
// design's own (see key_update_pkg); the document fixes only that the TPM is
// reached through SPI.
module tpm_client
  import aes_pkg::*;
  import key_update_pkg::*;
#(
  parameter int unsigned HALF       = 2,
  parameter int unsigned SLOT_BYTES = 1     // 1 or 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  output logic       req_ready,
  input  tpm_op_e    req_op,
  input  logic [15:0] req_slot,
  output logic       rsp_valid,
  output block_t     rsp_key,
  // SPI pins to the TPM
  output logic       spi_cs_n,
  output logic       spi_sclk,
  output logic       spi_mosi,
  input  logic       spi_miso
);

  typedef enum logic [1:0] {S_IDLE, S_CS, S_BYTE, S_WAIT} state_e;
  state_e     st;
  tpm_op_e    op;
  logic [15:0] slot;
  logic [4:0] nbyte;              // index of the byte being sent
  logic [4:0] last;
  logic       bstart, bbusy, bdone;
  logic [7:0] btx, brx;
  block_t     key_sh;

  spi_master #(.HALF(HALF)) u_spi (
    .clk, .rst_n,
    .start(bstart), .tx_byte(btx), .busy(bbusy), .done(bdone), .rx_byte(brx),
    .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso)
  );

  always_comb begin
    unique case (nbyte)
      5'd0:    btx = (op == TPM_READ) ? TPM_CMD_READ : TPM_CMD_GEN;
      5'd1:    btx = (SLOT_BYTES > 1) ? slot[15:8] : slot[7:0];
      5'd2:    btx = (SLOT_BYTES > 1) ? slot[7:0] : 8'h00;
      default: btx = 8'h00;
    endcase
  end

  assign bstart    = (st == S_BYTE) && !bbusy;
  assign req_ready = (st == S_IDLE);
  assign rsp_key   = key_sh;
  assign last      = (op == TPM_READ) ? 5'(KEY_BYTES + SLOT_BYTES) : 5'(SLOT_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      op        <= TPM_GEN;
      slot      <= '0;
      nbyte     <= '0;
      key_sh    <= '0;
      spi_cs_n  <= 1'b1;
      rsp_valid <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (req_valid) begin
          op       <= req_op;
          slot     <= req_slot;
          nbyte    <= '0;
          spi_cs_n <= 1'b0;
          st       <= S_CS;
        end
        S_CS:   st <= S_BYTE;            // one clock of chip-select set-up
        S_BYTE: if (!bbusy) st <= S_WAIT; // byte launched this cycle
        S_WAIT: if (bdone) begin
          if (nbyte > 5'(SLOT_BYTES)) key_sh <= {key_sh[119:0], brx};
          if (nbyte == last) begin
            spi_cs_n  <= 1'b1;
            rsp_valid <= 1'b1;
            st        <= S_IDLE;
          end else begin
            nbyte <= nbyte + 5'd1;
            st    <= S_BYTE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
