// tb_key_list_ram: self-checking test of the receiver's key list memory.
//
// Writes random keys to every entry of an 8-entry list, reads them back in
// random order, checks the one-clock read latency and that rd_data holds
// while rd_en is low, then overwrites entries and reads again.
module tb_key_list_ram;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  localparam int unsigned N = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we = 1'b0, rd_en = 1'b0;
  logic [2:0] waddr = '0, raddr = '0;
  block_t wdata = '0, rd_data;
  bit [127:0] model [N];
  int checks = 0, failures = 0;

  key_list_ram #(.NUM_KEYS(N)) dut (.*);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int a;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        we = 1'b1;
        waddr = 3'(i);
        model[i] = rand128();
        wdata = model[i];
      end
      @(negedge clk);
      we = 1'b0;
      for (int n = 0; n < 40; n++) begin
        a = $urandom_range(N - 1);
        rd_en = 1'b1;
        raddr = 3'(a);
        @(negedge clk);
        rd_en = 1'b0;
        raddr = 3'(a + 1);
        check($sformatf("entry %0d", a), rd_data == model[a]);
        @(negedge clk);
        check("held while rd_en low", rd_data == model[a]);
      end
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
