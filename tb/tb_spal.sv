// tb_spal -- loads random DNF functions term by term and compares Z with a
// direct evaluation for all input combinations; also checks clear, an empty
// function (Z = 0), a term with no literals (Z = 1) and the term limit.
module tb_spal;
  localparam int M = 4, T = 8;
  logic clk = 0, rst_n = 0, clr = 0, term_we = 0;
  logic [M-1:0] term_pos = '0, term_neg = '0, x = '0;
  logic z, full;
  logic [M-1:0] rp [T], rn [T];
  int nterms;
  int checks = 0, failures = 0;

  spal #(.M(M), .N_TERMS(T)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_z(logic [M-1:0] xv);
    logic r = 0;
    for (int t = 0; t < nterms; t++)
      if (((xv & rp[t]) == rp[t]) && ((~xv & rn[t]) == rn[t])) r = 1;
    return r;
  endfunction

  task automatic add_term(logic [M-1:0] p, logic [M-1:0] n);
    @(negedge clk); term_we = 1; term_pos = p; term_neg = n;
    @(negedge clk); term_we = 0;
    if (nterms < T) begin rp[nterms] = p; rn[nterms] = n; nterms++; end
  endtask

  task automatic do_clear();
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0;
    nterms = 0;
  endtask

  task automatic sweep();
    for (int v = 0; v < (1 << M); v++) begin
      x = M'(v); #1;
      checks++;
      if (z !== ref_z(x)) begin
        failures++;
        $display("FAIL x=%b z=%b exp %b (%0d terms)", x, z, ref_z(x), nterms);
      end
    end
  endtask

  initial begin
    nterms = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    sweep();                       // empty: Z = 0
    add_term('0, '0);              // no literals: Z = 1
    sweep();
    for (int f = 0; f < 40; f++) begin
      int k;
      do_clear();
      k = $urandom_range(1, T);
      for (int t = 0; t < k; t++) begin
        logic [M-1:0] p, n;
        p = M'($urandom); n = M'($urandom) & ~p;
        add_term(p, n);
      end
      sweep();
    end
    // fill to the limit, extra terms are ignored
    do_clear();
    for (int t = 0; t < T; t++) add_term(M'(1) << (t % M), '0);
    checks++;
    if (!full) begin failures++; $display("FAIL full not set"); end
    add_term('0, '0);              // ignored by both
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
