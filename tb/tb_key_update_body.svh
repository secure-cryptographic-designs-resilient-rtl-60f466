// tb_key_update_body.svh: shared stimulus and checks of the end-to-end
// testbenches of key_update_system. The including module declares N, UPV,
// NBLK, the top's signals, the instance dut and the TPM model tpm; it
// reports the result and ends the run once body_done is set.

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit [127:0] sent [$];
  bit [127:0] on_link [$];
  int nin = 0, nlink = 0, nout = 0;
  int tx_updates = 0, rx_updates = 0, wraps = 0, stalls = 0, link_bp = 0, out_bp = 0;
  int per_key [N];
  int exp_per_key [N];
  logic took = 1'b0;
  bit   body_done = 1'b0;

  always @(posedge clk) if (rst_n) begin
    took <= pt_in_valid && pt_in_ready;
    if (tx_key_update) begin
      tx_updates++;
      if (tx_key_idx == '0) wraps++;
    end
    if (rx_key_update) rx_updates++;
    if (pt_in_valid && !pt_in_ready && !dut.u_tx.enc_busy) stalls++;
    if (dut.u_tx.ct_valid && !dut.u_tx.ct_ready) link_bp++;
    if (pt_out_valid && !pt_out_ready) out_bp++;
    if (pt_in_valid && pt_in_ready) begin
      sent.push_back(pt_in_data);
      on_link.push_back(pt_in_data);
      per_key[tx_key_idx]++;
      nin++;
    end
    if (link_fire) begin
      bit [127:0] p;
      int k;
      p = on_link.pop_front();
      k = (nlink / UPV) % N;
      if (nlink % UPV == 0 && (nlink / UPV) < 2 * N && (nlink / UPV) < 8)
        $display("link block %0d: key %0d = %h", nlink, k, tpm.nvm[k]);
      check($sformatf("ciphertext of block %0d", nlink), link_data == encrypt(tpm.nvm[k], p));
      nlink++;
    end
    if (pt_out_valid && pt_out_ready) begin
      bit [127:0] p;
      p = sent.pop_front();
      check($sformatf("plaintext of block %0d", nout), pt_out_data == p);
      nout++;
    end
  end

  initial begin
    init();
    check("reference AES known answer",
          encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734)
          == 128'h3925841d02dc09fbdc118597196a0b32);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    up    = UP_W'(UPV);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (nin < NBLK) begin
      @(negedge clk);
      pt_out_ready = ($urandom_range(3) != 0);
      if (!pt_in_valid || took) begin
        pt_in_valid = ($urandom_range(7) != 0);
        pt_in_data  = rand128();
      end
      if (took && nin >= NBLK) pt_in_valid = 1'b0;
    end
    pt_in_valid  = 1'b0;
    pt_out_ready = 1'b1;
    wait (nout == NBLK);
    repeat (5) @(negedge clk);
    $display("blocks %0d, key updates tx %0d rx %0d, wraps %0d, stalls %0d, link back-pressure %0d, output back-pressure %0d",
             nout, tx_updates, rx_updates, wraps, stalls, link_bp, out_bp);
    for (int i = 0; i < N && i < 8; i++) $display("blocks under key %0d: %0d", i, per_key[i]);
    check("TPM generated the key list", tpm.gen_count == N);
    check("receiver got the list", rx_list_ready);
    check("all blocks through", nlink == NBLK && nout == NBLK);
    check("sender key updates happened", tx_updates >= NBLK / UPV - 1);
    check("receiver followed every update", rx_updates == tx_updates);
    check("key list wrapped", wraps > 0);
    check("input stalled at key changes", stalls > 0);
    check("link back-pressure happened", link_bp > 0);
    check("output back-pressure happened", out_bp > 0);
    for (int b = 0; b < NBLK; b++) exp_per_key[(b / UPV) % N]++;
    for (int i = 0; i < N; i++)
      check($sformatf("blocks under key %0d: %0d exp %0d", i, per_key[i], exp_per_key[i]),
            per_key[i] == exp_per_key[i]);
    body_done = 1'b1;
  end
