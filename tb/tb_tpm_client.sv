// tb_tpm_client: self-checking test of the TPM command client over SPI.
//
// The client talks to the TPM model. Generates keys into 6 slots, reads
// them back in random order and compares with the model's key store; checks
// chip select is high between frames and low during one, req_ready is low
// during a frame, and the frame times: 2 + 2*(16*HALF+2) clocks for a generate
// and 2 + 18*(16*HALF+2) clocks for a read (request edge to rsp_valid).
module tb_tpm_client;
  import aes_pkg::*;
  import key_update_pkg::*;
  localparam int unsigned HALF = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid = 1'b0, req_ready, rsp_valid;
  tpm_op_e req_op = TPM_GEN;
  logic [15:0] req_slot = '0;
  block_t rsp_key;
  logic spi_cs_n, spi_sclk, spi_mosi, spi_miso;
  int checks = 0, failures = 0;

  tpm_client #(.HALF(HALF)) dut (.*);
  tpm_model tpm (.spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic request(tpm_op_e op, int slot, int exp_lat);
    int lat;
    @(negedge clk);
    check("cs high and ready between frames", spi_cs_n && req_ready);
    req_valid = 1'b1;
    req_op    = op;
    req_slot  = 16'(slot);
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!rsp_valid && lat < 2000) begin
      check("cs low and not ready in frame", !spi_cs_n && !req_ready);
      @(negedge clk);
      lat++;
    end
    check($sformatf("frame time %0d == %0d", lat, exp_lat), lat == exp_lat);
    if (op == TPM_READ)
      check($sformatf("slot %0d key %h exp %h", slot, rsp_key, tpm.nvm[slot]), rsp_key == tpm.nvm[slot]);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 6; s++) request(TPM_GEN, s, 2 + 2 * (16 * HALF + 2));
    check("model saw 6 generates", tpm.gen_count == 6);
    for (int s = 0; s < 6; s++) check($sformatf("slot %0d filled", s), tpm.nvm[s] != '0);
    for (int n = 0; n < 12; n++) request(TPM_READ, $urandom_range(5), 2 + 18 * (16 * HALF + 2));
    check("model saw 12 reads", tpm.read_count == 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
