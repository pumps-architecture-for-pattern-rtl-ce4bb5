// tb_assoc_logic -- bit-serial comparisons against integer arithmetic.
//
// Four units see the same 16-bit field, one per comparison (EQ, LT, GT,
// PROX); four more are cascaded from them over a second field, so they must
// give the comparison of the 32-bit concatenation. The key and mask bits are
// driven MSB first as the key register would; masked-off bits must not count.
// Random idle cycles between bits check that the state only moves with en.
module tb_assoc_logic;
  import sel_pkg::*;
  localparam int KB = 16;
  logic clk = 0, rst_n = 0;
  logic en1 = 0, first1 = 0, en2 = 0, first2 = 0, d = 0, k1 = 0, m1 = 0, k2 = 0, m2 = 0;
  cmp_state_t st1 [4], st2 [4];
  logic [3:0] x1, x2;
  int checks = 0, failures = 0;
  int hits [4];

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar o = 0; o < 4; o++) begin : g_u
    assoc_logic u1 (.clk, .rst_n, .en(en1), .first(first1), .data_bit(d),
      .key_bit(k1), .mask_bit(m1), .op(cmp_op_e'(o)), .cascade(1'b0),
      .casc_in(CMP_STATE_INIT), .state_q(st1[o]), .x_match(x1[o]));
    assoc_logic u2 (.clk, .rst_n, .en(en2), .first(first2), .data_bit(d),
      .key_bit(k2), .mask_bit(m2), .op(cmp_op_e'(o)), .cascade(1'b1),
      .casc_in(st1[o]), .state_q(st2[o]), .x_match(x2[o]));
  end

  function automatic logic [3:0] ref_cmp(logic [63:0] dv, logic [63:0] kv, logic [63:0] mv);
    logic [63:0] a, b;
    int diff;
    a = dv & mv; b = kv & mv;
    diff = $countones((dv ^ kv) & mv);
    return {diff <= 1, a > b, a < b, a == b};
  endfunction

  task automatic chk(logic [3:0] got, logic [3:0] exp, string what);
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (got[o] !== exp[o]) begin
        failures++;
        $display("FAIL %s op %0d got %b exp %b", what, o, got[o], exp[o]);
      end
      if (exp[o]) hits[o]++;
    end
  endtask

  initial begin
    logic [KB-1:0] D1, D2, K1, K2, M1, M2;
    foreach (hits[i]) hits[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 400; trial++) begin
      K1 = KB'($urandom); K2 = KB'($urandom);
      M1 = (trial % 3 == 0) ? '1 : KB'($urandom);
      M2 = (trial % 3 == 0) ? '1 : KB'($urandom);
      // data near the key so equality and proximity happen often
      case (trial % 4)
        0: begin D1 = K1; D2 = K2; end
        1: begin D1 = K1 ^ (KB'(1) << $urandom_range(0, KB-1)); D2 = K2; end
        2: begin D1 = K1; D2 = KB'($urandom); end
        default: begin D1 = KB'($urandom); D2 = KB'($urandom); end
      endcase
      for (int b = KB - 1; b >= 0; b--) begin
        @(negedge clk);
        en1 = 1; first1 = (b == KB - 1); d = D1[b]; k1 = K1[b]; m1 = M1[b];
        @(negedge clk);
        en1 = 0; first1 = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
      @(negedge clk);
      chk(x1, ref_cmp(64'(D1), 64'(K1), 64'(M1)), "field1");
      for (int b = KB - 1; b >= 0; b--) begin
        en2 = 1; first2 = (b == KB - 1); d = D2[b]; k2 = K2[b]; m2 = M2[b];
        @(negedge clk);
        en2 = 0; first2 = 0;
      end
      chk(x2, ref_cmp({32'b0, D1, D2}, {32'b0, K1, K2}, {32'b0, M1, M2}), "cascade");
      chk(x1, ref_cmp(64'(D1), 64'(K1), 64'(M1)), "field1 held");
    end
    for (int o = 0; o < 4; o++) begin
      checks++;
      if (hits[o] == 0) begin failures++; $display("FAIL op %0d never true", o); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
