// tb_aes_key_expand: self-checking test of the AES-128 key schedule.
//
// Checks RoundKey 10 of the FIPS-197 Appendix A.1 key, all 11 round keys of
// 100 random keys against the reference schedule, done arriving 11 clocks
// after the start edge with busy high in between, and rk_valid dropping at
// a new start.
module tb_aes_key_expand;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, busy, done, rk_valid;
  block_t key = '0, rd_key;
  logic [3:0] rd_idx = '0;
  bit [127:0] rks [11];
  int checks = 0, failures = 0;

  aes_key_expand dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(bit [127:0] k);
    int lat;
    expand(k, rks);
    @(negedge clk);
    key   = k;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check("rk_valid low after start", !rk_valid);
    lat = 1;
    while (!done && lat < 40) begin
      check("busy during expansion", busy);
      @(negedge clk);
      lat++;
    end
    check($sformatf("expansion latency %0d == 11", lat), lat == 11);
    check("rk_valid with done", rk_valid && !busy);
    for (int r = 0; r <= 10; r++) begin
      rd_idx = 4'(r);
      #1;
      check($sformatf("round key %0d: %h exp %h", r, rd_key, rks[r]), rd_key == rks[r]);
    end
  endtask

  initial begin
    init();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rd_idx = 4'd10;
    #1;
    check("FIPS-197 A.1 round key 10", rd_key == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6);
    for (int n = 0; n < 100; n++) run_one(rand128());
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
