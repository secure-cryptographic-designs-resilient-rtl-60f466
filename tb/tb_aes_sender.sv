// tb_aes_sender: self-checking test of the sender side with a TPM model.
//
// 3-key list, UP = 4, SPI at full speed (HALF = 1), 60 random plaintext
// blocks with random gaps and random ciphertext back-pressure. Checks the
// TPM saw one generate per key, the shared list equals the TPM's key store,
// UP is handed over, every ciphertext equals the reference AES under key
// (block / UP) mod 3 of the TPM store, the key index status matches, and
// plaintext is stalled at each key change.
module tb_aes_sender;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 3, UP_W = 16, KW = 2, UPV = 4, NBLK = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [UP_W-1:0] up = '0;
  logic pt_valid = 1'b0, pt_ready, ct_valid, ct_ready = 1'b0;
  block_t pt_data = '0, ct_data, share_key;
  logic share_valid, up_valid, key_update;
  logic [KW-1:0] share_idx, key_idx;
  logic [UP_W-1:0] up_value, ect;
  logic spi_cs_n, spi_sclk, spi_mosi, spi_miso;
  int checks = 0, failures = 0;

  aes_sender #(.NUM_KEYS(N), .UP_W(UP_W), .SPI_HALF(1)) dut (.*);
  tpm_model tpm (.spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // was the block on pt_data taken at the last edge?
  logic pt_ready_q = 1'b0;
  always @(posedge clk) pt_ready_q <= pt_valid && pt_ready;

  bit [127:0] sent [$];
  int nin = 0, nout = 0, shares = 0, ups = 0, stalls = 0, updates = 0;

  always @(posedge clk) if (rst_n) begin
    if (share_valid) begin
      check($sformatf("shared key %0d", share_idx), share_key == tpm.nvm[share_idx]);
      shares++;
    end
    if (up_valid) begin
      check("UP value", up_value == UPV);
      ups++;
    end
    if (key_update) updates++;
    if (pt_valid && !pt_ready && !dut.enc_busy) stalls++;  // engine idle, controller holds
    if (pt_valid && pt_ready) begin
      check($sformatf("key index at block %0d", nin), key_idx == KW'((nin / UPV) % N));
      sent.push_back(pt_data);
      nin++;
    end
    if (ct_valid && ct_ready) begin
      bit [127:0] p;
      p = sent.pop_front();
      check($sformatf("ct of block %0d", nout),
            ct_data == encrypt(tpm.nvm[(nout / UPV) % N], p));
      nout++;
    end
  end

  initial begin
    init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    up = 16'(UPV);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (nin < NBLK) begin
      @(negedge clk);
      ct_ready = ($urandom_range(3) != 0);
      if (!pt_valid || pt_ready_q) begin
        pt_valid = ($urandom_range(4) != 0);
        pt_data  = rand128();
      end
    end
    @(negedge clk);
    pt_valid = 1'b0;
    ct_ready = 1'b1;
    wait (nout == NBLK);
    check("one generate per key", tpm.gen_count == N);
    check("whole list shared", shares == N);
    check("UP handed over once", ups == 1);
    check($sformatf("key updates %0d", updates), updates >= NBLK / UPV - 1);
    check("plaintext stalled during key changes", stalls > 0);
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
