// tb_aes_dec_core: self-checking test of the AES-128 decryption engine.
//
// Round keys come from the reference key schedule, not from the RTL one.
// Checks the two FIPS-197 known answers backwards (ciphertext in, plaintext
// out), 200 random pairs made with the reference encryption, the 11-clock
// latency from the accepting edge to out_valid, that in_ready is low while
// busy, and that the result is held under output back-pressure.
module tb_aes_dec_core;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, busy;
  block_t in_data = '0, out_data, rk;
  logic [3:0] rk_idx;
  bit [127:0] rks [11];
  int checks = 0, failures = 0;

  assign rk = rks[rk_idx];

  aes_dec_core dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(bit [127:0] key, bit [127:0] ct, bit [127:0] exp_pt, int hold);
    int lat;
    expand(key, rks);
    @(negedge clk);
    in_data  = ct;
    in_valid = 1'b1;
    check("in_ready when idle", in_ready);
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 50) begin
      check("in_ready low while busy", !in_ready);
      @(negedge clk);
      lat++;
    end
    check($sformatf("latency %0d == 11", lat), lat == 11);
    repeat (hold) begin
      @(negedge clk);
      check("held under back-pressure", out_valid && out_data == exp_pt);
    end
    check($sformatf("pt %h exp %h", out_data, exp_pt), out_data == exp_pt);
    out_ready = 1'b1;
    @(negedge clk);
    out_ready = 1'b0;
    check("out_valid drops after handshake", !out_valid);
  endtask

  initial begin
    bit [127:0] k, p;
    init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check("ref KAT 1", encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
                       == 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run_one(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
            128'h00112233445566778899aabbccddeeff, 0);
    run_one(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
            128'h3243f6a8885a308d313198a2e0370734, 3);
    for (int n = 0; n < 200; n++) begin
      k = rand128();
      p = rand128();
      run_one(k, encrypt(k, p), p, n % 3);
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
