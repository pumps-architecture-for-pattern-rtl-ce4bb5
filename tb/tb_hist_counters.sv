// tb_hist_counters -- random increments against a reference array, clear,
// and saturation (4-bit counters so they fill up quickly).
module tb_hist_counters;
  localparam int N = 8, CB = 4;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [N-1:0] sel = '0;
  logic [$clog2(N)-1:0] rd_idx = '0;
  logic [CB-1:0] rd_data;
  int ref_cnt [N];
  int checks = 0, failures = 0, saturated = 0;

  hist_counters #(.N(N), .CNT_BITS(CB)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      rd_idx = i[$clog2(N)-1:0];
      #1;
      checks++;
      if (rd_data !== CB'(ref_cnt[i])) begin
        failures++;
        $display("FAIL counter %0d got %0d exp %0d", i, rd_data, ref_cnt[i]);
      end
    end
  endtask

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int step = 0; step < 200; step++) begin
        @(negedge clk);
        inc = ($urandom_range(0, 3) != 0);
        sel = N'(1) << $urandom_range(0, N - 1);
        @(posedge clk); #1;
        if (inc) for (int i = 0; i < N; i++)
          if (sel[i]) begin
            if (ref_cnt[i] < (1 << CB) - 1) ref_cnt[i]++;
            else saturated++;
          end
        inc = 0;
        if (step % 25 == 0) check_all();
      end
      check_all();
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      foreach (ref_cnt[i]) ref_cnt[i] = 0;
      check_all();
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
