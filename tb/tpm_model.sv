// tpm_model: behavioural stand-in for the TPM on the SPI bus (simulation only).
//
// It answers the frames of key_update_pkg: TPM_CMD_GEN fills a key slot with
// a fresh random key (from $urandom, standing in for the TRNG), or with a
// fixed key: PRESET = 1 gives the four keys of the evaluated run in slots
// 0..3, PRESET = 2 the eight keys of a TPM key generation run in slots 0..7;
// other slots stay random. TPM_CMD_READ
// clocks out the slot's 16 key bytes after the header bytes. The slot number
// takes SLOT_BYTES bytes, most significant first. SPI mode 0:
// MOSI is sampled on rising SCLK and MISO changes after each rising edge.
// The key store nvm can be read hierarchically by a testbench, and gen_count
// and read_count count completed frames.
module tpm_model
  import key_update_pkg::*;
#(
  parameter int unsigned PRESET     = 0,
  parameter int unsigned SLOT_BYTES = 1
) (
  input  logic spi_cs_n,
  input  logic spi_sclk,
  input  logic spi_mosi,
  output logic spi_miso
);


  localparam int unsigned HDR = 1 + SLOT_BYTES;   // header bytes
  logic [127:0] nvm [1 << (8 * SLOT_BYTES)];
  int           bitpos, nbyte;
  logic [7:0]   rx_sh, cmd, tx_byte;
  logic [15:0]  slot;
  int           gen_count = 0, read_count = 0;

  function automatic logic [127:0] preset_key(int s);
    if (PRESET == 1)
      case (s)
        0: return 128'h1D22BF01AC77D921EA3415F5368910A2;
        1: return 128'hF01ED23CB45A967809AF81EB27CD1FA9;
        2: return 128'h9745C3731DAD77B117B576F45B4C1EE0;
        default: return 128'h2B7E151628AED2A6ABF7158809CF4F3C;
      endcase
    else
      case (s)
        0: return 128'h77D809A16E13C11613F6A2F3F57D3ADD;
        1: return 128'h01662F482BE0BE86C5E142B3541B5FB9;
        2: return 128'h72F0C957178C96ECA600CDB04596F110;
        3: return 128'h2610E9B66AE20A7F4EA7549BA5316F96;
        4: return 128'h9AB4C746E8E898FE992B23BE68B672E5;
        5: return 128'h1EC5BB56BEBF2B6514CF9F88D394BD90;
        6: return 128'h6EC57619896BB1C4F8A9594864049DEB;
        default: return 128'hB7B33CEC5BE58D46680FADEC6413AF40;
      endcase
  endfunction

  function automatic bit preset_slot(int s);
    return (PRESET == 1 && s < 4) || (PRESET == 2 && s < 8);
  endfunction

  initial begin
    for (int i = 0; i < (1 << (8 * SLOT_BYTES)); i++) nvm[i] = '0;
    bitpos  = 0;
    nbyte   = 0;
    rx_sh   = '0;
    cmd     = '0;
    slot    = '0;
    tx_byte = '0;
  end

  assign spi_miso = tx_byte[7 - bitpos];

  always @(negedge spi_cs_n) begin
    bitpos  = 0;
    nbyte   = 0;
    tx_byte = 8'h00;
  end

  always @(posedge spi_cs_n) begin
    if (nbyte == HDR && cmd == TPM_CMD_GEN) begin
      nvm[slot] = preset_slot(int'(slot)) ? preset_key(int'(slot))
                                                : {$urandom, $urandom, $urandom, $urandom};
      gen_count++;
    end
    if (nbyte == HDR + KEY_BYTES && cmd == TPM_CMD_READ) read_count++;
  end

  always @(posedge spi_sclk) begin
    if (!spi_cs_n) begin
      rx_sh = {rx_sh[6:0], spi_mosi};
      if (bitpos == 7) begin
        if (nbyte == 0) begin
          cmd  = rx_sh;
          slot = '0;
        end
        if (nbyte >= 1 && nbyte < HDR) slot = {slot[7:0], rx_sh};
        nbyte++;
        bitpos = 0;
        if (cmd == TPM_CMD_READ && nbyte >= HDR && nbyte < HDR + KEY_BYTES)
          tx_byte = nvm[slot][127 - 8*(nbyte - HDR) -: 8];
        else
          tx_byte = 8'h00;
      end else begin
        bitpos++;
      end
    end
  end

endmodule
