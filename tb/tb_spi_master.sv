// tb_spi_master: self-checking test of the byte-wide SPI master.
//
// A small mode-0 slave in the testbench records MOSI on each rising SCLK and
// drives MISO from its own byte, changing it after each rising edge. Checks
// for 100 random byte pairs (and HALF=3) that the slave received tx_byte,
// the master returned the slave's byte, SCLK idles low, and done comes
// 16*HALF+1 clocks after the start edge.
module tb_spi_master;
  localparam int unsigned HALF = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, sclk, mosi, miso;
  logic [7:0] tx_byte = '0, rx_byte;
  logic [7:0] slave_rx, slave_tx;
  int slave_bit;
  int checks = 0, failures = 0;

  spi_master #(.HALF(HALF)) dut (.*);

  assign miso = slave_tx[7 - slave_bit];
  always @(posedge sclk) begin
    slave_rx  = {slave_rx[6:0], mosi};
    slave_bit = (slave_bit + 1) % 8;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int lat;
    logic [7:0] t, r;
    slave_bit = 0;
    slave_rx  = '0;
    slave_tx  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      t = 8'($urandom);
      r = 8'($urandom);
      slave_tx = r;
      @(negedge clk);
      check("sclk idles low", !sclk && !busy);
      tx_byte = t;
      start   = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 1;
      while (!done && lat < 200) begin
        @(negedge clk);
        lat++;
      end
      check($sformatf("byte time %0d == %0d", lat, 16 * HALF + 1), lat == 16 * HALF + 1);
      check($sformatf("slave got %h exp %h", slave_rx, t), slave_rx == t);
      check($sformatf("master got %h exp %h", rx_byte, r), rx_byte == r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
