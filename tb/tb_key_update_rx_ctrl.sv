// tb_key_update_rx_ctrl: self-checking test of the receiver controller.
//
// The key list memory, key expansion and decryption engine are emulated
// here. With a 3-key list and UP = 5 it checks: nothing starts until every
// list entry (sent out of order) and UP have arrived; keys are read in loop
// order 0,1,2,0,... with expansion started the clock after each read;
// exactly UP blocks are accepted per key, run drops once DCT reaches UP, and
// a key_update pulse marks each key change.
module tb_key_update_rx_ctrl;
  import aes_pkg::*;
  localparam int unsigned N = 3, UP_W = 16, KW = 2;
  localparam int unsigned UPV = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic share_valid = 1'b0, up_valid = 1'b0;
  logic [KW-1:0] share_idx = '0;
  logic [UP_W-1:0] up_value = '0, dct;
  logic ram_rd_en, ke_start, ke_done = 1'b0;
  logic [KW-1:0] ram_raddr, key_idx;
  logic dec_accept, dec_busy, run, list_ready, key_update;
  int checks = 0, failures = 0;

  key_update_rx_ctrl #(.NUM_KEYS(N), .UP_W(UP_W)) dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int reads = 0, ke_n = 0, ke_cnt = 0, busy_cnt = 0, per_key = 0, updates = 0;
  logic last_rd = 1'b0, offer = 1'b0;
  assign dec_busy   = (busy_cnt > 0);
  assign dec_accept = offer && run && !dec_busy;
  always @(posedge clk) begin
    last_rd <= ram_rd_en;
    ke_done <= 1'b0;
    offer   <= ($urandom_range(2) != 0);
    if (rst_n && ram_rd_en) begin
      check($sformatf("read %0d in loop order", reads), ram_raddr == KW'(reads % N));
      check("reads only after list and UP", list_ready);
      reads++;
    end
    if (rst_n && ke_start) begin
      check("expansion starts the clock after the read", last_rd);
      ke_n++;
      ke_cnt <= 4;
    end else if (ke_cnt > 0) begin
      ke_cnt <= ke_cnt - 1;
      if (ke_cnt == 1) ke_done <= 1'b1;
    end
    if (dec_accept) begin
      busy_cnt <= 2;
      per_key++;
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
    if (rst_n && key_update) begin
      check($sformatf("UP blocks per key (%0d)", per_key), per_key == UPV);
      per_key = 0;
      updates++;
    end
    if (rst_n && dct >= UPV) check("run low once DCT reaches UP", !run);
  end

  task automatic share(int i);
    @(negedge clk);
    share_valid = 1'b1;
    share_idx   = KW'(i);
    @(negedge clk);
    share_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    share(2);
    share(0);
    repeat (5) @(negedge clk);
    check("not ready with part of the list", !list_ready && !run);
    @(negedge clk);
    up_valid = 1'b1;
    up_value = 16'(UPV);
    @(negedge clk);
    up_valid = 1'b0;
    repeat (5) @(negedge clk);
    check("not ready without the last entry", !list_ready && reads == 0);
    share(1);
    wait (updates == 8);
    repeat (2) @(negedge clk);
    check("read per key change", reads == 9 && ke_n == 9);
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
