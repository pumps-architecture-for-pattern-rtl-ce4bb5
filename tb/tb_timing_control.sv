// tb_timing_control -- checks the per-unit field enables, the first-bit
// strobes, the record start/last marks and the end-of-record pulse against a
// position counter kept by the testbench, for random record lengths, field
// positions, unit enables, projected fields and gaps in the input.
module tb_timing_control;
  localparam int NU = 4, KB = 8, PB = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PB-1:0] rec_len = PB'(32);
  logic [PB-1:0] start [NU];
  logic [NU-1:0] unit_on = '0, proj_on = '0;
  logic sor, last, eor, keep;
  logic [NU-1:0] en, first;
  int checks = 0, failures = 0, eor_seen = 0;

  timing_control #(.N_UNITS(NU), .KEY_BITS(KB), .POS_BITS(PB)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    int pos, len;
    logic was_last;
    foreach (start[i]) start[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    pos = 0;
    was_last = 0;
    for (int cfg = 0; cfg < 30; cfg++) begin
      @(negedge clk);
      len = $urandom_range(KB, 64);
      rec_len = PB'(len);
      unit_on = NU'($urandom);
      proj_on = (cfg % 3 == 0) ? '0 : NU'($urandom);
      foreach (start[i]) start[i] = PB'($urandom_range(0, len - KB));
      for (int cyc = 0; cyc < 4 * len; cyc++) begin
        in_valid = ($urandom_range(0, 3) != 0);
        #1;
        chk(eor, was_last, "eor");
        if (eor) eor_seen++;
        chk(sor, in_valid && pos == 0, "sor");
        chk(last, in_valid && pos == len - 1, "last");
        for (int i = 0; i < NU; i++) begin
          chk(en[i], in_valid && unit_on[i] && pos >= start[i] && pos < start[i] + KB, "en");
          chk(first[i], in_valid && unit_on[i] && pos == start[i], "first");
        end
        begin
          bit kp;
          kp = (proj_on == 0);
          for (int i = 0; i < NU; i++)
            if (proj_on[i] && pos >= start[i] && pos < start[i] + KB) kp = 1;
          chk(keep, in_valid && kp, "keep");
        end
        was_last = in_valid && pos == len - 1;
        if (in_valid) pos = (pos == len - 1) ? 0 : pos + 1;
        @(negedge clk);
      end
      // finish the record before changing the configuration
      while (pos != 0) begin
        in_valid = 1;
        was_last = (pos == len - 1);
        pos = (pos == len - 1) ? 0 : pos + 1;
        @(negedge clk);
      end
      in_valid = 0;
      #1;
      chk(eor, was_last, "eor at end");
      was_last = 0;
    end
    checks++;
    if (eor_seen == 0) begin failures++; $display("FAIL no eor"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
