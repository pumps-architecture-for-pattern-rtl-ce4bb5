// tb_key_register -- checks that the key register presents its key and mask
// MSB first, one bit per shift, that it returns to the loaded value after
// KEY_BITS shifts (circulation), and that it holds while shift is low.
module tb_key_register;
  localparam int KB = 16;
  logic clk = 0, rst_n = 0, load_key = 0, load_mask = 0, shift = 0;
  logic [KB-1:0] wdata = '0;
  logic key_bit, mask_bit;
  int checks = 0, failures = 0;

  key_register #(.KEY_BITS(KB)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0b exp %0b", what, got, exp);
    end
  endtask

  initial begin
    logic [KB-1:0] k, m;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      k = KB'($urandom); m = KB'($urandom);
      @(negedge clk); load_key = 1; wdata = k;
      @(negedge clk); load_key = 0; load_mask = 1; wdata = m;
      @(negedge clk); load_mask = 0;
      for (int turn = 0; turn < 2; turn++)
        for (int b = KB - 1; b >= 0; b--) begin
          chk(key_bit, k[b], "key bit");
          chk(mask_bit, m[b], "mask bit");
          // hold for a random number of idle cycles
          shift = 0;
          repeat ($urandom_range(0, 2)) begin
            @(negedge clk);
            chk(key_bit, k[b], "key hold");
          end
          shift = 1;
          @(negedge clk);
          shift = 0;
        end
      chk(key_bit, k[KB-1], "key back after turns");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
