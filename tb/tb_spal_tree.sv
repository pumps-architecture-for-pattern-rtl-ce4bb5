// tb_spal_tree -- programs random DNF terms into every SPAL of five trees of
// different shapes and compares Z with a level-by-level evaluation of the
// same terms: 3 inputs (one SPAL), 8 inputs of 4-input SPALs (two leaves and
// a root), 9 and 10 inputs of 3-input SPALs (two and three levels, padded
// groups) and 16 inputs of 2-input SPALs (four levels, 15 SPALs). All trees
// share the programming bus, so SPAL s of every tree gets the same terms,
// cut to its input width.
module tb_spal_tree;
  localparam int T = 4, NS = 15, NCFG = 5;
  localparam int CFG_NI [NCFG] = '{3, 8, 9, 10, 16};
  localparam int CFG_SI [NCFG] = '{4, 4, 3, 3, 2};
  logic clk = 0, rst_n = 0, clr = 0, term_we = 0;
  logic [3:0] sel = '0;
  logic [3:0] term_pos = '0, term_neg = '0;
  logic [15:0] x = '0;
  logic [NCFG-1:0] z;
  // reference terms: [spal][term]
  logic [3:0] rp [NS][T], rn [NS][T];
  int nt [NS];
  int checks = 0, failures = 0;
  int ones [NCFG], zeros [NCFG];

  spal_tree #(.N_IN(3),  .SPAL_IN(4), .N_TERMS(T), .SELW(4)) dut0 (
    .clk, .rst_n, .sel, .clr, .term_we, .term_pos, .term_neg, .x(x[2:0]), .z(z[0]));
  spal_tree #(.N_IN(8),  .SPAL_IN(4), .N_TERMS(T), .SELW(4)) dut1 (
    .clk, .rst_n, .sel, .clr, .term_we, .term_pos, .term_neg, .x(x[7:0]), .z(z[1]));
  spal_tree #(.N_IN(9),  .SPAL_IN(3), .N_TERMS(T), .SELW(4)) dut2 (
    .clk, .rst_n, .sel, .clr, .term_we, .term_pos(term_pos[2:0]), .term_neg(term_neg[2:0]),
    .x(x[8:0]), .z(z[2]));
  spal_tree #(.N_IN(10), .SPAL_IN(3), .N_TERMS(T), .SELW(4)) dut3 (
    .clk, .rst_n, .sel, .clr, .term_we, .term_pos(term_pos[2:0]), .term_neg(term_neg[2:0]),
    .x(x[9:0]), .z(z[3]));
  spal_tree #(.N_IN(16), .SPAL_IN(2), .N_TERMS(T), .SELW(4)) dut4 (
    .clk, .rst_n, .sel, .clr, .term_we, .term_pos(term_pos[1:0]), .term_neg(term_neg[1:0]),
    .x(x), .z(z[4]));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic eval_spal(int s, int si, logic [3:0] xv);
    logic [3:0] m = 4'((1 << si) - 1);
    logic r = 0;
    for (int t = 0; t < nt[s]; t++)
      if (((xv & rp[s][t] & m) == (rp[s][t] & m)) && ((~xv & rn[s][t] & m) == (rn[s][t] & m)))
        r = 1;
    return r;
  endfunction

  // evaluate the tree of ni inputs and si-input SPALs level by level
  function automatic logic eval_tree(int ni, int si, logic [15:0] xv);
    logic [15:0] cur = xv & 16'((1 << ni) - 1);
    logic [15:0] nxt;
    int w = ni, c, base = 0;
    do begin
      c = (w + si - 1) / si;
      nxt = '0;
      for (int k = 0; k < c; k++)
        nxt[k] = eval_spal(base + k, si, 4'((cur >> (k * si)) & 16'((1 << si) - 1)));
      base += c;
      cur = nxt;
      w = c;
    end while (w > 1);
    return cur[0];
  endfunction

  initial begin
    logic exp_z;
    for (int i = 0; i < NCFG; i++) begin ones[i] = 0; zeros[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      for (int s = 0; s < NS; s++) begin
        @(negedge clk); sel = 4'(s); clr = 1;
        @(negedge clk); clr = 0;
        nt[s] = $urandom_range(1, T);
        for (int t = 0; t < nt[s]; t++) begin
          rp[s][t] = 4'($urandom);
          rn[s][t] = 4'($urandom) & ~rp[s][t];
          // keep terms short so that Z takes both values
          if ($urandom_range(0, 1) == 1) begin rp[s][t] &= 4'b0101; rn[s][t] &= 4'b0101; end
          term_pos = rp[s][t]; term_neg = rn[s][t]; term_we = 1;
          @(negedge clk); term_we = 0;
        end
      end
      for (int v = 0; v < 600; v++) begin
        x = 16'($urandom);
        #1;
        for (int i = 0; i < NCFG; i++) begin
          if (CFG_NI[i] == 3 && v >= 8) continue;
          if (CFG_NI[i] == 3) x[2:0] = 3'(v);
          #1;
          exp_z = eval_tree(CFG_NI[i], CFG_SI[i], x);
          checks++;
          if (exp_z) ones[i]++; else zeros[i]++;
          if (z[i] !== exp_z) begin
            failures++;
            $display("FAIL tree %0d x=%h z=%b exp %b", i, x, z[i], exp_z);
          end
        end
      end
    end
    for (int i = 0; i < NCFG; i++) begin
      checks++;
      if (ones[i] == 0 || zeros[i] == 0) begin
        failures++; $display("FAIL tree %0d Z never changed (%0d ones)", i, ones[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
