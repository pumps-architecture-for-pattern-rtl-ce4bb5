// tb_selection_module -- end-to-end test of the selection processing module.
//
// Selection: for several random configurations (record length, field
// positions, keys, masks, comparison kinds, cascaded long keys, SPAL terms)
// a stream of records is sent, built so that fields often equal or nearly
// equal their keys. The testbench computes every unit's match bit with
// integer arithmetic on the (concatenated) fields, evaluates the SPAL tree
// itself and checks that exactly the accepted records come out, with their
// bits, marks and, for a gapless stream, a latency of rec_len + 2 cycles.
// Every third configuration also projects the fields of some units, and only
// those bits of accepted records may come out.
// Histogram: thresholds are loaded in descending order with CMP_GT, pixels
// are sent and the counters are compared with a software histogram.
module tb_selection_module;
  import sel_pkg::*;
  localparam int NK = 8, KB = 16, SI = 4, CB = 32;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic in_valid = 0, in_bit = 0;
  logic out_valid, out_bit, out_first, out_last;
  logic [NK-1:0] x_hold;
  logic z, rec_done, any_match;
  logic [$clog2(NK)-1:0] first_idx, cnt_idx = '0;
  logic [CB-1:0] cnt_data;
  int checks = 0, failures = 0;
  int n_projdrop = 0, n_pass = 0, n_drop = 0, n_casc = 0, n_hist = 0, n_nohit = 0;
  int op_true [4];

  selection_module dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // ---------------- reference configuration ----------------
  int        rlen;
  logic [NK-1:0] on;
  int        st [NK];
  logic [KB-1:0] key [NK], msk [NK];
  cmp_op_e   op [NK];
  bit        casc [NK];
  bit        prj [NK];
  bit        projecting = 0;
  logic [SI-1:0] tp [3][8], tn [3][8];
  int        nt [3];

  function automatic logic spal_eval(int s, logic [SI-1:0] xv);
    logic r = 0;
    for (int t = 0; t < nt[s]; t++)
      if (((xv & tp[s][t]) == tp[s][t]) && ((~xv & tn[s][t]) == tn[s][t])) r = 1;
    return r;
  endfunction

  function automatic logic [NK-1:0] ref_x(logic rec [256]);
    logic [NK-1:0] xr;
    for (int i = 0; i < NK; i++) begin
      logic [127:0] d, k, m, a, b;
      int j, diff;
      d = '0; k = '0; m = '0;
      j = i;
      while (j > 0 && casc[j]) j--;   // head of the cascade chain
      for (int u = j; u <= i; u++)
        for (int b2 = 0; b2 < KB; b2++) begin
          d = {d[126:0], rec[st[u] + b2]};
          k = {k[126:0], key[u][KB-1-b2]};
          m = {m[126:0], msk[u][KB-1-b2]};
        end
      a = d & m; b = k & m;
      diff = $countones((d ^ k) & m);
      case (op[i])
        CMP_EQ:  xr[i] = (a == b);
        CMP_LT:  xr[i] = (a < b);
        CMP_GT:  xr[i] = (a > b);
        default: xr[i] = (diff <= 1);
      endcase
      if (!on[i]) xr[i] = 0;
      else if (xr[i]) op_true[op[i]]++;
    end
    return xr;
  endfunction

  // ---------------- output checker ----------------
  logic exp_bit [$], exp_first [$], exp_last [$], exp_valid [$];
  int   exp_cyc [$];
  int   cyc = 0;
  bit   check_latency = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && (out_valid || out_first || out_last)) begin
    if (exp_bit.size() == 0) chk(0, "unexpected output bit");
    else begin
      logic eb, ef, el, ev; int ec;
      eb = exp_bit.pop_front(); ef = exp_first.pop_front();
      el = exp_last.pop_front(); ec = exp_cyc.pop_front();
      ev = exp_valid.pop_front();
      chk(out_valid == ev, "projection");
      if (ev) chk(out_bit == eb, "output bit");
      chk(out_first == ef && out_last == el, "record marks");
      if (check_latency) chk(cyc - ec == rlen + 2, $sformatf("latency %0d", cyc - ec));
    end
  end

  // match bits and decision, checked the cycle after they are loaded
  logic [NK-1:0] exp_x [$];
  logic          exp_z [$];
  logic          rec_done_q = 0;
  always @(posedge clk) begin
    rec_done_q <= rec_done;
    if (rec_done_q && exp_x.size() > 0) begin
      logic [NK-1:0] ex; logic ez;
      ex = exp_x.pop_front(); ez = exp_z.pop_front();
      chk(x_hold == ex, $sformatf("x_hold %b exp %b", x_hold, ex));
      chk(z == ez, "z");
    end
  end

  function automatic bit projected(int p);
    bit any = 0, in = 0;
    for (int i = 0; i < NK; i++)
      if (prj[i]) begin
        any = 1;
        if (p >= st[i] && p < st[i] + KB) in = 1;
      end
    return !any || in;
  endfunction

  task automatic send_record(logic rec [256], bit keep, bit gaps);
    for (int p = 0; p < rlen; p++) begin
      while (gaps && $urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_bit = rec[p];
      if (keep && (projected(p) || p == 0 || p == rlen - 1)) begin
        if (!projected(p)) n_projdrop++;
        exp_valid.push_back(projected(p));
        exp_bit.push_back(rec[p]); exp_first.push_back(p == 0);
        exp_last.push_back(p == rlen - 1); exp_cyc.push_back(cyc);
      end
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  task automatic configure_selection();
    rlen = $urandom_range(4 * KB, 12 * KB);
    wr(A_RECLEN, 32'(rlen));
    wr(A_MODE, 32'(MODE_SELECT));
    on = NK'($urandom) | NK'(3);
    for (int i = 0; i < NK; i++) begin
      op[i]  = cmp_op_e'($urandom_range(0, 3));
      key[i] = KB'($urandom);
      msk[i] = ($urandom_range(0, 1) == 0) ? '1 : KB'($urandom);
      st[i]  = (i == 0) ? $urandom_range(0, rlen - 2 * KB) : $urandom_range(0, rlen - KB);
      casc[i] = 0;
      if (i > 0 && on[i] && on[i-1] && (i == 1 || $urandom_range(0, 2) == 0) && st[i-1] + 2 * KB <= rlen) begin
        casc[i] = 1;
        st[i] = $urandom_range(st[i-1] + KB, rlen - KB);
        // the whole chain must run in order: move only forward
        n_casc++;
      end
      wr(A_KEY_BASE + 12'(i), 32'(key[i]));
      wr(A_MASK_BASE + 12'(i), 32'(msk[i]));
      prj[i] = projecting && ($urandom_range(0, 2) == 0);
      wr(A_CTRL_BASE + 12'(i), (32'(st[i]) << 16) | (32'(prj[i]) << 3) | (32'(casc[i]) << 2) | 32'(op[i]));
    end
    wr(A_UNIT_EN, 32'(on));
    for (int s = 0; s < 3; s++) begin
      wr(A_TCLR_BASE + 12'(s), 0);
      nt[s] = $urandom_range(1, 4);
      for (int t = 0; t < nt[s]; t++) begin
        tp[s][t] = SI'($urandom);
        tn[s][t] = SI'($urandom) & ~tp[s][t];
        if (s == 2) begin tp[s][t] &= 4'b0011; tn[s][t] &= 4'b0011; end
        wr(A_TERM_BASE + 12'(s), 32'(tp[s][t]) | (32'(tn[s][t]) << 16));
      end
    end
  endtask

  task automatic make_record(output logic rec [256]);
    foreach (rec[p]) rec[p] = 1'($urandom);
    for (int i = 0; i < NK; i++) begin
      int r;
      r = $urandom_range(0, 3);
      if (r != 0) begin
        logic [KB-1:0] v;
        v = key[i];
        if (r == 2) v ^= KB'(1) << $urandom_range(0, KB - 1);
        if (r == 3) v += ($urandom_range(0, 1) == 1) ? KB'(1) : '1;
        for (int b = 0; b < KB; b++) rec[st[i] + b] = v[KB-1-b];
      end
    end
  endtask

  initial begin
    logic rec [256];
    logic [NK-1:0] xr;
    logic zr;
    foreach (op_true[i]) op_true[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---------------- selection ----------------
    for (int c = 0; c < 12; c++) begin
      bit gaps;
      projecting = (c % 3 == 2);
      configure_selection();
      gaps = (c % 2 == 1);
      check_latency = !gaps;
      for (int r = 0; r < 25; r++) begin
        make_record(rec);
        xr = ref_x(rec);
        zr = spal_eval(2, {2'b00, spal_eval(1, xr[7:4]), spal_eval(0, xr[3:0])});
        if (zr) n_pass++; else n_drop++;
        exp_x.push_back(xr); exp_z.push_back(zr);
        send_record(rec, zr, gaps);
      end
      foreach (rec[p]) rec[p] = 0;
      send_record(rec, 0, 0);         // flush the last record out
      repeat (rlen + 8) @(negedge clk);
      chk(exp_bit.size() == 0, "all accepted bits came out");
      exp_bit.delete(); exp_first.delete(); exp_last.delete(); exp_cyc.delete();
      exp_valid.delete();
    end
    // ---------------- histogram ----------------
    begin
      int hist [NK];
      logic [KB-1:0] thr [NK];
      rlen = KB;
      wr(A_RECLEN, 32'(KB));
      wr(A_MODE, 32'(MODE_HIST));
      wr(A_CLR_CNT, 0);
      for (int i = 0; i < NK; i++) begin
        thr[i] = KB'((NK - 1 - i) * 6000 + 1000);       // descending thresholds
        wr(A_KEY_BASE + 12'(i), 32'(thr[i]));
        wr(A_MASK_BASE + 12'(i), 32'hFFFF);
        wr(A_CTRL_BASE + 12'(i), 32'(CMP_GT));
        prj[i] = 0;
        hist[i] = 0;
      end
      wr(A_UNIT_EN, 32'('1));
      for (int p = 0; p < 300; p++) begin
        logic [KB-1:0] px;
        int bin;
        px = (p % 10 == 0) ? KB'($urandom_range(0, 1000)) : KB'($urandom);
        bin = -1;
        for (int i = NK - 1; i >= 0; i--) if (px > thr[i]) bin = i;   // lowest index
        if (bin >= 0) begin hist[bin]++; n_hist++; end else n_nohit++;
        for (int b = 0; b < KB; b++) rec[b] = px[KB-1-b];
        send_record(rec, 0, p % 3 == 0);
      end
      repeat (5) @(negedge clk);
      for (int i = 0; i < NK; i++) begin
        cnt_idx = i[$clog2(NK)-1:0]; #1;
        chk(cnt_data == CB'(hist[i]), $sformatf("counter %0d = %0d exp %0d", i, cnt_data, hist[i]));
      end
      wr(A_CLR_CNT, 0);
      cnt_idx = 0; #1;
      chk(cnt_data == 0, "counter clear");
    end
    chk(n_pass > 0 && n_drop > 0, "records both passed and dropped");
    chk(n_casc > 0, "cascade used");
    chk(n_projdrop > 0, "projection dropped bits");
    chk(n_nohit > 0 && n_hist > 0, "histogram hits and misses");
    for (int o = 0; o < 4; o++) chk(op_true[o] > 0, $sformatf("op %0d matched", o));
    $display("pass=%0d drop=%0d cascades=%0d hist=%0d below_all=%0d", n_pass, n_drop, n_casc, n_hist, n_nohit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
