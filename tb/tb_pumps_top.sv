// tb_pumps_top -- end-to-end test of the top level at its default sizes.
//
// 1. Relational selection on a tuple stream. Tuples are 128 bits:
//      [0:31] id, [32:47] dept (low 8 bits significant), [48:63] age,
//      [64:79] code, rest payload. The query is
//      Z = (id > ID_MIN & dept == DEPT & ~(age < AGE_MIN)) | code ~ CODE
//    where id > ID_MIN uses two 16-bit key registers cascaded into one 32-bit
//    key, dept == DEPT is masked to 8 bits and code ~ CODE is the proximity
//    search (at most one bit different). The function is split across the two
//    leaf SPALs and the root SPAL. The testbench evaluates the query on the
//    integer fields and checks the output stream and its latency.
//    The query is run twice, the second time projecting each selected tuple
//    onto its id and code fields.
// 2. Histogram of a 32 x 32 synthetic image with 8 descending thresholds.
//    A second pass over the same image, in selection mode, keeps the pixels
//    above a threshold chosen from the counters.
// 3. SRAN: two TPUs competing for one PPVU, hand-over after release, a
//    PPVU-to-PPVU path and a PPVU asking for itself.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_pumps_top;
  import sel_pkg::*;
  localparam int NK = 8, KB = 16, CB = 32, NT = 4, NP = 4, NS = 8, DW = 16;
  localparam int RLEN = 128;
  localparam logic [31:0] ID_MIN = 32'h4000_0000;
  localparam logic [7:0]  DEPT = 8'd5;
  localparam logic [15:0] AGE_MIN = 16'd30, CODE = 16'hA5C3;

  logic clk = 0, rst_n = 0;
  logic sel_cfg_we = 0;
  logic [11:0] sel_cfg_addr = '0;
  logic [31:0] sel_cfg_wdata = '0;
  logic sel_in_valid = 0, sel_in_bit = 0;
  logic sel_out_valid, sel_out_bit, sel_out_first, sel_out_last;
  logic [NK-1:0] sel_x_hold;
  logic sel_z, sel_rec_done, sel_any_match;
  logic [2:0] sel_first_idx, sel_cnt_idx = '0;
  logic [CB-1:0] sel_cnt_data;
  logic [NS-1:0] sran_req = '0, sran_grant;
  logic [1:0] sran_dst [NS];
  logic [DW-1:0] sran_wdata [NS], sran_rdata [NS];
  logic [NP-1:0] sran_ppvu_in_valid, sran_ppvu_conflict;
  logic [DW-1:0] sran_ppvu_in_data [NP], sran_ppvu_out_data [NP];

  pumps_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_pass = 0, m_drop = 0, m_casc = 0, m_eq = 0, m_lt = 0, m_prox = 0;
  int m_thresh = 0, m_proj = 0, m_leaf1 = 0, m_hist = 0, m_below = 0, m_multi = 0, m_clear = 0, m_restart = 0;
  int m_grant = 0, m_conflict = 0, m_p2p = 0, m_handover = 0, m_self = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk); sel_cfg_we = 1; sel_cfg_addr = a; sel_cfg_wdata = d;
    @(negedge clk); sel_cfg_we = 0;
  endtask

  task automatic unit(int i, logic [15:0] key, logic [15:0] mask, int start, bit casc, cmp_op_e op);
    wr(A_KEY_BASE + 12'(i), 32'(key));
    wr(A_MASK_BASE + 12'(i), 32'(mask));
    wr(A_CTRL_BASE + 12'(i), (32'(start) << 16) | (32'(casc) << 2) | 32'(op));
  endtask

  task automatic term(int s, logic [3:0] p, logic [3:0] n);
    wr(A_TERM_BASE + 12'(s), 32'(p) | (32'(n) << 16));
  endtask

  // ---------------- output checker ----------------
  logic exp_bit [$], exp_first [$], exp_last [$], exp_valid [$];
  logic [RLEN-1:0] proj_mask = '1;   // bit positions passed (MSB = bit 0)
  int   exp_cyc [$];
  int   cyc = 0;
  bit   check_latency = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && (sel_out_valid || sel_out_first || sel_out_last)) begin
    if (exp_bit.size() == 0) chk(0, "unexpected output bit");
    else begin
      logic eb, ef, el, ev; int ec;
      eb = exp_bit.pop_front(); ef = exp_first.pop_front();
      el = exp_last.pop_front(); ec = exp_cyc.pop_front();
      ev = exp_valid.pop_front();
      chk(sel_out_valid == ev, "projection");
      if (ev) chk(sel_out_bit == eb, "output bit");
      chk(sel_out_first == ef && sel_out_last == el, "record marks");
      if (check_latency) chk(cyc - ec == RLEN + 2, $sformatf("latency %0d", cyc - ec));
    end
  end

  task automatic send(logic [RLEN-1:0] rec, int len, bit keep);
    for (int p = 0; p < len; p++) begin
      sel_in_valid = 1; sel_in_bit = rec[RLEN-1-p];   // bit 0 of the record = MSB
      if (keep && (proj_mask[RLEN-1-p] || p == 0 || p == len - 1)) begin
        if (!proj_mask[RLEN-1-p]) m_proj++;
        exp_valid.push_back(proj_mask[RLEN-1-p]);
        exp_bit.push_back(sel_in_bit); exp_first.push_back(p == 0);
        exp_last.push_back(p == len - 1); exp_cyc.push_back(cyc);
      end
      @(negedge clk);
    end
    sel_in_valid = 0;
  endtask

  // ---------------- 1. selection ----------------
  task automatic selection_phase(bit project);
    wr(A_RECLEN, RLEN);
    m_restart++;
    wr(A_MODE, 32'(MODE_SELECT));
    unit(0, ID_MIN[31:16], 16'hFFFF, 0, 0, CMP_GT);    // id, high half
    unit(1, ID_MIN[15:0],  16'hFFFF, 16, 1, CMP_GT);   // id, low half, cascaded
    // projection onto (id, code): units 0, 1 and 4 mark the projected fields
    proj_mask = project ? {32'hFFFF_FFFF, 32'h0, 16'hFFFF, 48'h0} : '1;
    if (project) begin
      wr(A_CTRL_BASE + 12'(0), (32'(0)  << 16) | 32'(8) | 32'(CMP_GT));
      wr(A_CTRL_BASE + 12'(1), (32'(16) << 16) | 32'(8) | 32'(4) | 32'(CMP_GT));
    end
    unit(2, {8'h00, DEPT}, 16'h00FF, 32, 0, CMP_EQ);   // dept, low byte only
    unit(3, AGE_MIN,       16'hFFFF, 48, 0, CMP_LT);   // age < AGE_MIN
    unit(4, CODE,          16'hFFFF, 64, 0, CMP_PROX); // code within one bit
    if (project) wr(A_CTRL_BASE + 12'(4), (32'(64) << 16) | 32'(8) | 32'(CMP_PROX));
    wr(A_UNIT_EN, 32'h1F);
    // leaf 0 (X0..X3): X1 & X2 & ~X3; leaf 1 (X4..X7): X4; root: Z0 | Z1
    for (int s = 0; s < 3; s++) wr(A_TCLR_BASE + 12'(s), 0);
    term(0, 4'b0110, 4'b1000);
    term(1, 4'b0001, 4'b0000);
    term(2, 4'b0001, 4'b0000);
    term(2, 4'b0010, 4'b0000);
    check_latency = 1;
    @(negedge clk);
    for (int t = 0; t < 100; t++) begin
      logic [31:0] id; logic [15:0] dept, age, code;
      logic [RLEN-1:0] rec;
      bit c_id, c_dept, c_age, c_code, zr;
      id   = (t % 5 == 0) ? ID_MIN + 32'($urandom_range(0, 2)) - 1 : $urandom;
      if (t % 7 == 0) id = {ID_MIN[31:16], 16'($urandom)};
      dept = {8'($urandom), (t % 2 == 0) ? DEPT : 8'($urandom_range(0, 9))};
      age  = 16'($urandom_range(15, 70));
      code = (t % 4 == 0) ? CODE ^ (16'(1) << $urandom_range(0, 15)) : 16'($urandom);
      rec  = {id, dept, age, code, 48'($urandom) << 16 | 48'($urandom)};
      c_id   = id > ID_MIN;
      c_dept = dept[7:0] == DEPT;
      c_age  = age < AGE_MIN;
      c_code = $countones(code ^ CODE) <= 1;
      zr = (c_id && c_dept && !c_age) || c_code;
      if (id[31:16] == ID_MIN[31:16]) m_casc++;
      if (c_dept) m_eq++;
      if (c_age) m_lt++;
      if (c_code) begin m_prox++; m_leaf1++; end
      if (zr) m_pass++; else m_drop++;
      send(rec, RLEN, zr);
    end
    send('0, RLEN, 0);                // flush the last tuple out
    repeat (RLEN + 8) @(negedge clk);
    chk(exp_bit.size() == 0, "all selected tuples came out");
    check_latency = 0;
    proj_mask = '1;
  endtask

  // ---------------- 2. histogram ----------------
  logic [15:0] image [32*32];
  int hist [NK];
  logic [15:0] thr [NK];

  task automatic histogram_phase();
    wr(A_RECLEN, KB);
    m_restart++;
    wr(A_MODE, 32'(MODE_HIST));
    wr(A_CLR_CNT, 0);
    for (int i = 0; i < NK; i++) begin
      thr[i] = 16'((NK - 1 - i) * 8000 + 500);
      unit(i, thr[i], 16'hFFFF, 0, 0, CMP_GT);
      hist[i] = 0;
    end
    wr(A_UNIT_EN, 32'hFF);
    @(negedge clk);
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 32; c++) begin
        logic [15:0] px;
        int bin, resp;
        px = 16'(r * 2000 + c * 40) ^ 16'($urandom_range(0, 63));
        image[r*32 + c] = px;
        bin = -1; resp = 0;
        for (int i = NK - 1; i >= 0; i--) if (px > thr[i]) begin bin = i; resp++; end
        if (bin >= 0) begin hist[bin]++; m_hist++; end else m_below++;
        if (resp > 1) m_multi++;
        send({px, 112'b0}, KB, 0);
      end
    repeat (4) @(negedge clk);
    for (int i = 0; i < NK; i++) begin
      sel_cnt_idx = 3'(i); #1;
      chk(sel_cnt_data == CB'(hist[i]), $sformatf("bin %0d: %0d exp %0d", i, sel_cnt_data, hist[i]));
    end
    wr(A_CLR_CNT, 0);
    m_clear++;
    for (int i = 0; i < NK; i++) begin
      sel_cnt_idx = 3'(i); #1;
      chk(sel_cnt_data == 0, "cleared");
    end
  endtask

  // ---------------- 2b. thresholding, second pass ----------------
  // From the counters choose the threshold below which about half of the
  // image lies, then stream the image again in selection mode and keep only
  // the pixels above it.
  task automatic threshold_phase();
    int cum, sel_bin, n_exp;
    logic [15:0] t;
    cum = 0; sel_bin = NK - 1;
    for (int i = 0; i < NK; i++) begin
      cum += hist[i];
      if (cum >= 512) begin sel_bin = i; break; end
    end
    t = thr[sel_bin];
    wr(A_RECLEN, KB);
    wr(A_MODE, 32'(MODE_SELECT));
    unit(0, t, 16'hFFFF, 0, 0, CMP_GT);
    wr(A_UNIT_EN, 32'h01);
    for (int s = 0; s < 3; s++) wr(A_TCLR_BASE + 12'(s), 0);
    term(0, 4'b0001, 4'b0000);
    term(2, 4'b0001, 4'b0000);
    @(negedge clk);
    n_exp = 0;
    for (int p = 0; p < 32 * 32; p++) begin
      bit above;
      above = image[p] > t;
      if (above) n_exp++;
      send({image[p], 112'b0}, KB, above);
    end
    send('0, KB, 0);
    repeat (KB + 8) @(negedge clk);
    chk(exp_bit.size() == 0, "all pixels above the threshold came out");
    chk(n_exp == cum, $sformatf("second pass keeps %0d pixels, histogram says %0d", n_exp, cum));
    if (n_exp > 0 && n_exp < 32 * 32) m_thresh++;
  endtask

  // ---------------- 3. SRAN ----------------
  task automatic sran_phase();
    foreach (sran_ppvu_out_data[k]) sran_ppvu_out_data[k] = DW'(16'hC000 + k);
    // TPU0 and TPU1 both ask for PPVU2 in the same cycle
    @(negedge clk);
    sran_dst[0] = 2; sran_dst[1] = 2; sran_req[0] = 1; sran_req[1] = 1;
    sran_wdata[0] = 16'h1111; sran_wdata[1] = 16'h2222;
    #1; if (sran_ppvu_conflict[2]) m_conflict++;
    chk(sran_ppvu_conflict[2], "conflict flagged");
    @(negedge clk);
    chk(sran_grant[0] && !sran_grant[1], "TPU0 wins PPVU2");
    chk(sran_ppvu_in_data[2] == 16'h1111 && sran_rdata[0] == 16'hC002, "TPU0 <-> PPVU2 data");
    if (sran_grant[0]) m_grant++;
    repeat (3) @(negedge clk);
    chk(sran_grant[0] && !sran_grant[1], "TPU0 keeps PPVU2");
    sran_req[0] = 0;                                   // release
    @(negedge clk);
    chk(!sran_grant[0], "TPU0 released");
    @(negedge clk);
    chk(sran_grant[1] && sran_ppvu_in_data[2] == 16'h2222, "PPVU2 handed to TPU1");
    if (sran_grant[1]) m_handover++;
    // PPVU1 (source NT+1) uses PPVU3; PPVU3 asks for itself
    sran_dst[NT+1] = 3; sran_req[NT+1] = 1; sran_wdata[NT+1] = 16'h5A5A;
    sran_dst[NT+3] = 3; sran_req[NT+3] = 1;
    repeat (2) @(negedge clk);
    chk(sran_grant[NT+1] && sran_ppvu_in_data[3] == 16'h5A5A && sran_rdata[NT+1] == 16'hC003,
        "PPVU1 -> PPVU3 path");
    if (sran_grant[NT+1]) m_p2p++;
    chk(!sran_grant[NT+3], "no PPVU serves itself");
    if (!sran_grant[NT+3]) m_self++;
    sran_req = '0;
    @(negedge clk);
  endtask

  initial begin
    foreach (sran_dst[s]) begin sran_dst[s] = '0; sran_wdata[s] = '0; end
    foreach (sran_ppvu_out_data[k]) sran_ppvu_out_data[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    selection_phase(0);
    selection_phase(1);
    histogram_phase();
    threshold_phase();
    sran_phase();
    chk(m_pass > 0, "tuples passed");     chk(m_drop > 0, "tuples dropped");
    chk(m_casc > 0, "cascaded long key"); chk(m_eq > 0, "masked equality");
    chk(m_lt > 0, "threshold");           chk(m_prox > 0, "proximity");
    chk(m_thresh > 0, "thresholding pass");
    chk(m_leaf1 > 0, "second leaf SPAL");  chk(m_proj > 0, "projection");  chk(m_hist > 0, "histogram counts");
    chk(m_below > 0, "pixel below all");  chk(m_multi > 0, "multiple responders");
    chk(m_clear > 0, "counter clear");    chk(m_restart > 0, "stream restart");
    chk(m_grant > 0, "SRAN grant");        chk(m_conflict > 0, "SRAN conflict");
    chk(m_handover > 0, "SRAN hand-over"); chk(m_p2p > 0, "PPVU-to-PPVU path");
    chk(m_self > 0, "self request refused");
    $display("pass=%0d drop=%0d cascade_ties=%0d eq=%0d lt=%0d prox=%0d hist=%0d below=%0d multi=%0d",
             m_pass, m_drop, m_casc, m_eq, m_lt, m_prox, m_hist, m_below, m_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
