// tb_record_gate -- streams random records through the gate with a decision
// per record that is presented the way the selection module does (loaded one
// cycle after the record's last bit). Checks that exactly the accepted
// records come out, bit for bit, with first/last marks, and that a bit leaves
// rec_len + 2 cycles after it entered when the stream has no gaps. A second
// phase inserts random gaps; a third, after a restart with a new record
// length, checks that the record buffered before the restart is dropped;
// the last phase projects part of each record (keep) and checks that only
// those bits come out while the record marks still do.
module tb_record_gate;
  localparam int DEPTH = 64, PB = 16;
  logic clk = 0, rst_n = 0;
  logic [PB-1:0] rec_len;
  logic restart = 0, in_valid = 0, in_bit = 0, keep = 0, sor = 0, last = 0, z;
  logic out_valid, out_bit, out_first, out_last;
  int checks = 0, failures = 0, passed = 0, dropped = 0;

  record_gate #(.DEPTH(DEPTH), .POS_BITS(PB)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decision pipeline as in the selection module
  logic dec [$];
  logic eor_q = 0;
  logic z_q = 0;
  int   rec_in = 0;
  always_ff @(posedge clk) begin
    eor_q <= last;
    if (eor_q) begin z_q <= dec[rec_in]; rec_in <= rec_in + 1; end
  end
  assign z = z_q;

  // expected output: bits of accepted records and the cycle each bit entered
  logic exp_bit [$];
  int   exp_cyc [$];
  logic exp_first [$], exp_last [$], exp_valid [$];
  int   cyc = 0;
  bit   check_latency;
  bit   project = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (out_valid || out_first || out_last) begin
    if (exp_bit.size() == 0) begin
      failures++; checks++; $display("FAIL unexpected output bit");
    end else begin
      logic eb, ef, el, ev; int ec;
      eb = exp_bit.pop_front(); ec = exp_cyc.pop_front();
      ef = exp_first.pop_front(); el = exp_last.pop_front();
      ev = exp_valid.pop_front();
      checks += 4;
      if (out_valid !== ev) begin failures++; $display("FAIL projection"); end
      if (ev && out_bit !== eb) begin failures++; $display("FAIL bit"); end
      if (out_first !== ef) begin failures++; $display("FAIL first mark"); end
      if (out_last !== el)  begin failures++; $display("FAIL last mark"); end
      if (check_latency) begin
        checks++;
        if (cyc - ec != int'(rec_len) + 2) begin
          failures++; $display("FAIL latency %0d", cyc - ec);
        end
      end
    end
  end

  task automatic run(int nrec, int len, bit gaps, bit tail_take = 0);
    logic r [$];
    int pos;
    rec_len = PB'(len);
    for (int k = 0; k < nrec + 1; k++) begin
      logic take;
      take = (k < nrec) ? ($urandom_range(0, 2) != 0) : 1'b0;  // last is padding
      dec.push_back((k < nrec) ? take : tail_take);
      if (take) passed++; else dropped++;
      for (pos = 0; pos < len; pos++) begin
        while (gaps && $urandom_range(0, 3) == 0) begin
          in_valid = 0; sor = 0; last = 0;
          @(negedge clk);
        end
        in_valid = 1; in_bit = 1'($urandom);
        keep = !project || ((pos / 4) % 2 == 1);
        sor = (pos == 0); last = (pos == len - 1);
        if (take && (keep || sor || last)) begin
          exp_bit.push_back(in_bit); exp_cyc.push_back(cyc); exp_valid.push_back(keep);
          exp_first.push_back(pos == 0); exp_last.push_back(pos == len - 1);
        end
        @(negedge clk);
      end
    end
    in_valid = 0; sor = 0; last = 0;
    repeat (len + 8) @(negedge clk);
  endtask

  initial begin
    rec_len = PB'(24);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_latency = 1;
    run(20, 24, 0);
    check_latency = 0;
    run(20, 24, 1, 1);    // same stream, with gaps; accepted tail record...
    @(negedge clk); restart = 1; rec_len = PB'(40);
    @(negedge clk); restart = 0;
    check_latency = 1;    // ...is dropped by the restart: never output
    run(10, 40, 0);
    project = 1;          // projection: only bits 4-7, 12-15, ... of a record
    run(10, 40, 0);
    checks++;
    if (exp_bit.size() != 0) begin failures++; $display("FAIL %0d bits missing", exp_bit.size()); end
    checks++;
    if (passed == 0 || dropped == 0) begin failures++; $display("FAIL pass/drop not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
