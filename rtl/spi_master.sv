// spi_master: byte-wide SPI master, mode 0 (CPOL=0, CPHA=0), MSB first.
//
// All traffic between the FPGA fabric and the TPM (instructions and key
// exchange) runs over SPI. This block shifts one byte per request: a pulse
// on start with tx_byte begins a transfer, SCLK toggles every HALF clocks,
// MOSI is presented before each rising edge and MISO is sampled on it. done
// pulses for one cycle with rx_byte after the eighth bit, 16*HALF+1 clocks
// after the start edge. Chip select is not handled here: the frame owner (tpm_client)
// drives it around a run of bytes. The mode, bit order and clock divider are
// this design's choices; the document states only that an SPI link is used.
module spi_master #(
  parameter int unsigned HALF = 2           // system clocks per SCLK half period
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx_byte,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);

  localparam int unsigned CW = (HALF > 1) ? $clog2(HALF) : 1;

  logic [7:0]    tx_sh, rx_sh;
  logic [2:0]    bitn;
  logic [CW-1:0] div;

  assign mosi    = tx_sh[7];
  assign rx_byte = rx_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh <= '0;
      rx_sh <= '0;
      bitn  <= '0;
      div   <= '0;
      sclk  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          tx_sh <= tx_byte;
          bitn  <= '0;
          div   <= '0;
          busy  <= 1'b1;
        end
      end else if (div == CW'(HALF - 1)) begin
        div <= '0;
        if (!sclk) begin
          sclk  <= 1'b1;
          rx_sh <= {rx_sh[6:0], miso};
        end else begin
          sclk <= 1'b0;
          if (bitn == 3'd7) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            bitn  <= bitn + 3'd1;
            tx_sh <= {tx_sh[6:0], 1'b0};
          end
        end
      end else begin
        div <= div + CW'(1);
      end
    end
  end

endmodule
