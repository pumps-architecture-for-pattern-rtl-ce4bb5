// tb_mm_resolver -- exhaustive check of the multiple match resolution circuit
// for 8 inputs against a loop that searches for the lowest set bit.
module tb_mm_resolver;
  localparam int N = 8;
  logic [N-1:0] match, onehot;
  logic [$clog2(N)-1:0] idx;
  logic any;
  int checks = 0, failures = 0;

  mm_resolver #(.N(N)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    for (int v = 0; v < (1 << N); v++) begin
      match = N'(v);
      #1;
      first = -1;
      for (int i = 0; i < N; i++) if (v[i] && first < 0) first = i;
      checks++;
      if (any !== (first >= 0)) begin failures++; $display("FAIL any %h", v); end
      if (first >= 0) begin
        checks += 2;
        if (idx !== first[$clog2(N)-1:0]) begin failures++; $display("FAIL idx %h: %0d", v, idx); end
        if (onehot !== N'(1 << first)) begin failures++; $display("FAIL onehot %h: %b", v, onehot); end
      end else begin
        checks++;
        if (onehot !== '0) begin failures++; $display("FAIL onehot zero"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
