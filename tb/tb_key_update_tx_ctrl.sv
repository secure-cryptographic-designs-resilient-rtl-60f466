// tb_key_update_tx_ctrl: self-checking test of the sender controller.
//
// The TPM client, the key expansion and the encryption engine are emulated
// here with fixed latencies; the emulated TPM returns key f(slot). With a
// 3-key list (to exercise the wrap of a list that is not a power of two)
// and UP = 7, it checks: generate requests for slots 0,1,2 in order, then a
// read of each slot shared with the receiver as (slot, f(slot)), one UP
// hand-over, then key fetches in loop order 0,1,2,0,... each starting the
// expansion with f(slot); exactly UP blocks accepted per key, run low once
// ECT reaches UP, and a key_update pulse per key change.
module tb_key_update_tx_ctrl;
  import aes_pkg::*;
  import key_update_pkg::*;
  localparam int unsigned N = 3, UP_W = 16, KW = 2;
  localparam int unsigned UPV = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [UP_W-1:0] up = '0;
  logic tpm_req_valid, tpm_req_ready, tpm_rsp_valid = 1'b0;
  tpm_op_e tpm_req_op;
  logic [15:0] tpm_req_slot;
  block_t tpm_rsp_key = '0;
  logic share_valid, up_valid;
  logic [KW-1:0] share_idx;
  block_t share_key, ke_key;
  logic [UP_W-1:0] up_value, ect;
  logic ke_start, ke_done = 1'b0;
  logic enc_accept, enc_busy, run, key_update;
  logic [KW-1:0] key_idx;
  int checks = 0, failures = 0;

  key_update_tx_ctrl #(.NUM_KEYS(N), .UP_W(UP_W)) dut (.*);

  function automatic block_t f(int s);
    return {4{32'hC0DE0000 | 32'(s)}} ^ 128'h1;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // emulated TPM client: 4 clocks per request
  int pend = 0;
  int req_n = 0;
  logic [15:0] pslot;
  assign tpm_req_ready = (pend == 0);
  always @(posedge clk) begin
    tpm_rsp_valid <= 1'b0;
    if (pend > 0) begin
      pend <= pend - 1;
      if (pend == 1) begin
        tpm_rsp_valid <= 1'b1;
        tpm_rsp_key   <= f(int'(pslot));
      end
    end else if (rst_n && tpm_req_valid) begin
      // expected request sequence
      if (req_n < N) check($sformatf("req %0d is GEN %0d", req_n, req_n),
                           tpm_req_op == TPM_GEN && tpm_req_slot == 16'(req_n));
      else if (req_n < 2 * N) check($sformatf("req %0d is share READ", req_n),
                           tpm_req_op == TPM_READ && tpm_req_slot == 16'(req_n - N));
      else check($sformatf("req %0d is fetch READ %0d got %0d", req_n, (req_n - 2 * N) % N, tpm_req_slot),
                 tpm_req_op == TPM_READ && tpm_req_slot == 16'((req_n - 2 * N) % N));
      req_n++;
      pslot <= tpm_req_slot;
      pend  <= 4;
    end
  end

  // emulated key expansion: done 5 clocks after start
  int ke_cnt = 0, ke_n = 0;
  always @(posedge clk) begin
    ke_done <= 1'b0;
    if (rst_n && ke_start) begin
      check($sformatf("expansion %0d key", ke_n), ke_key == f(ke_n % N));
      ke_n++;
      ke_cnt <= 5;
    end else if (ke_cnt > 0) begin
      ke_cnt <= ke_cnt - 1;
      if (ke_cnt == 1) ke_done <= 1'b1;
    end
  end

  // emulated engine: busy 3 clocks after an accept; random offer
  int busy_cnt = 0;
  logic offer = 1'b0;
  assign enc_busy   = (busy_cnt > 0);
  assign enc_accept = offer && run && !enc_busy;
  int per_key = 0, shares = 0, ups = 0, updates = 0;
  always @(posedge clk) begin
    offer <= ($urandom_range(3) != 0);
    if (enc_accept) begin
      busy_cnt <= 3;
      per_key++;
      check("ECT below UP at accept", ect < UPV);
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (rst_n && share_valid) begin
      check($sformatf("share %0d: %0d %h", shares, share_idx, share_key), share_idx == KW'(shares) && share_key == f(shares));
      shares++;
    end
    if (rst_n && up_valid) begin
      ups++;
      check($sformatf("UP handed over after the whole list (%0d, %0d)", shares, up_value), shares == N && up_value == UPV);
    end
    if (rst_n && key_update) begin
      check($sformatf("UP blocks per key (%0d)", per_key), per_key == UPV);
      check("key index advanced in loop order", key_idx == KW'((updates + 1) % N));
      per_key = 0;
      updates++;
    end
    if (rst_n && ect >= UPV) check("run low once ECT reaches UP", !run);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    up    = 16'(UPV);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    up    = '0;   // must have been latched
    wait (updates == 10);
    repeat (20) @(negedge clk);
    check("one UP hand-over", ups == 1);
    check("all keys shared", shares == N);
    check("fetch count", ke_n == 11);
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
