// tb_aes_receiver: self-checking test of the receiver side.
//
// The testbench plays the sender: it shares a random 3-key list out of
// order, hands over UP = 4 and sends 60 ciphertext blocks made with the
// reference AES under key (block / UP) mod 3, with random gaps and random
// plaintext back-pressure. Checks no ciphertext is taken before the list and
// UP are complete, every recovered plaintext equals the original, the key
// index status follows the blocks, and input is stalled at key changes.
module tb_aes_receiver;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 3, UP_W = 16, KW = 2, UPV = 4, NBLK = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic share_valid = 1'b0, up_valid = 1'b0;
  logic [KW-1:0] share_idx = '0, key_idx;
  block_t share_key = '0;
  logic [UP_W-1:0] up_value = '0, dct;
  logic ct_valid = 1'b0, ct_ready, pt_valid, pt_ready = 1'b0;
  block_t ct_data = '0, pt_data;
  logic list_ready, key_update;
  int checks = 0, failures = 0;

  aes_receiver #(.NUM_KEYS(N), .UP_W(UP_W)) dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit [127:0] keys [N];
  bit [127:0] sent [$];
  bit [127:0] pts [NBLK];
  int nin = 0, nout = 0, stalls = 0, updates = 0;
  logic took = 1'b0;

  always @(posedge clk) if (rst_n) begin
    took <= ct_valid && ct_ready;
    if (key_update) updates++;
    if (ct_valid && !ct_ready && !dut.dec_busy) stalls++;
    if (ct_valid && ct_ready) begin
      check("ciphertext only after list and UP", list_ready);
      check($sformatf("key index at block %0d", nin), key_idx == KW'((nin / UPV) % N));
      nin++;
    end
    if (pt_valid && pt_ready) begin
      check($sformatf("pt of block %0d", nout), pt_data == pts[nout]);
      nout++;
    end
  end

  task automatic share(int i);
    @(negedge clk);
    share_valid = 1'b1;
    share_idx   = KW'(i);
    share_key   = keys[i];
    @(negedge clk);
    share_valid = 1'b0;
  endtask

  initial begin
    int k;
    init();
    for (int i = 0; i < N; i++) keys[i] = rand128();
    for (int n = 0; n < NBLK; n++) pts[n] = rand128();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // offer the first block early: it must wait for the list
    ct_valid = 1'b1;
    ct_data  = encrypt(keys[0], pts[0]);
    k = 0;
    share(1);
    share(2);
    @(negedge clk);
    up_valid = 1'b1;
    up_value = 16'(UPV);
    @(negedge clk);
    up_valid = 1'b0;
    repeat (4) @(negedge clk);
    check("waiting for the last entry", nin == 0);
    share(0);
    while (k < NBLK) begin
      @(negedge clk);
      pt_ready = ($urandom_range(3) != 0);
      if (took) k++;
      if (k < NBLK && (!ct_valid || took)) begin
        ct_valid = ($urandom_range(4) != 0);
        ct_data  = encrypt(keys[(k / UPV) % N], pts[k]);
      end
      if (k >= NBLK) ct_valid = 1'b0;
    end
    pt_ready = 1'b1;
    wait (nout == NBLK);
    check($sformatf("key updates %0d", updates), updates >= NBLK / UPV - 1);
    check("input stalled during key changes", stalls > 0);
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
