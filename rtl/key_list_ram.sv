// key_list_ram: receiver-side store of the shared key list.
//
// The receiver of the key update scheme gets the whole key list from the
// sender before data flows and then uses the keys in list order. This is a
// NUM_KEYS x 128-bit memory with one write port (the share channel) and one
// read port with a registered output: rd_data holds the entry addressed at
// the last clock with rd_en high. Keeping the list in on-chip memory on the
// receiver side is this design's choice; the document only says that the
// receiver receives the list.
module key_list_ram
  import aes_pkg::*;
#(
  parameter int unsigned NUM_KEYS = 4,
  localparam int unsigned KW      = (NUM_KEYS > 1) ? $clog2(NUM_KEYS) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [KW-1:0] waddr,
  input  block_t        wdata,
  input  logic          rd_en,
  input  logic [KW-1:0] raddr,
  output block_t        rd_data
);

  block_t mem [NUM_KEYS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rd_data <= mem[raddr];
  end

endmodule
