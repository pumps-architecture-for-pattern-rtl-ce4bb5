// tb_sran -- random, persistent requests from 4 TPUs and 4 PPVUs against a
// cycle-by-cycle reference of the ownership rule (a free PPVU goes to the
// lowest-numbered requester, the owner keeps it while it asks, a PPVU never
// serves itself). Checks grants, both data directions and the conflict flags,
// and that conflicts, PPVU-to-PPVU paths and releases all occur.
module tb_sran;
  localparam int NT = 4, NP = 4, DW = 16, NS = NT + NP, PW = 2;
  logic clk = 0, rst_n = 0;
  logic [NS-1:0] req = '0;
  logic [PW-1:0] dst [NS];
  logic [DW-1:0] wdata [NS];
  logic [NS-1:0] grant;
  logic [DW-1:0] rdata [NS];
  logic [NP-1:0] ppvu_in_valid, ppvu_conflict;
  logic [DW-1:0] ppvu_in_data [NP];
  logic [DW-1:0] ppvu_out_data [NP];
  int checks = 0, failures = 0, n_conflict = 0, n_p2p = 0, n_release = 0;

  sran #(.N_TPU(NT), .N_PPVU(NP), .DW(DW)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference ownership
  bit busy [NP];
  int owner [NP];

  function automatic bit wants(int k, int s);
    return req[s] && dst[s] == PW'(k) && s != NT + k;
  endfunction

  task automatic chk(logic [DW-1:0] got, logic [DW-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    foreach (dst[s]) begin dst[s] = '0; wdata[s] = '0; end
    foreach (ppvu_out_data[k]) ppvu_out_data[k] = '0;
    foreach (busy[k]) begin busy[k] = 0; owner[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // requests change rarely so paths are held for a while
      for (int s = 0; s < NS; s++) begin
        if ($urandom_range(0, 7) == 0) req[s] = ~req[s];
        if (!req[s] && $urandom_range(0, 1) == 0) dst[s] = PW'($urandom);
        wdata[s] = DW'($urandom);
      end
      foreach (ppvu_out_data[k]) ppvu_out_data[k] = DW'($urandom);
      #1;
      begin
        logic [NS-1:0] eg;
        logic [DW-1:0] er [NS];
        eg = '0;
        foreach (er[s]) er[s] = '0;
        for (int k = 0; k < NP; k++) begin
          bit v;
          int nw;
          v = busy[k] && wants(k, owner[k]);
          nw = 0;
          for (int s = 0; s < NS; s++) if (wants(k, s) && !(busy[k] && s == owner[k])) nw++;
          chk(ppvu_in_valid[k], v, "in_valid");
          chk(ppvu_in_data[k], v ? wdata[owner[k]] : '0, "in_data");
          chk(ppvu_conflict[k], busy[k] ? (nw > 0) : (nw > 1), "conflict");
          if (ppvu_conflict[k]) n_conflict++;
          if (v) begin
            eg[owner[k]] = 1; er[owner[k]] = ppvu_out_data[k];
            if (owner[k] >= NT) n_p2p++;
          end
        end
        chk(DW'(grant), DW'(eg), "grant");
        for (int s = 0; s < NS; s++) chk(rdata[s], er[s], "rdata");
      end
      // advance the reference to the next clock edge
      for (int k = 0; k < NP; k++) begin
        if (busy[k] && !wants(k, owner[k])) begin busy[k] = 0; n_release++; end
        else if (!busy[k]) begin
          for (int s = NS - 1; s >= 0; s--) if (wants(k, s)) begin busy[k] = 1; owner[k] = s; end
        end
      end
    end
    checks += 3;
    if (n_conflict == 0) begin failures++; $display("FAIL no conflict"); end
    if (n_p2p == 0) begin failures++; $display("FAIL no PPVU-to-PPVU path"); end
    if (n_release == 0) begin failures++; $display("FAIL no release"); end
    $display("conflicts=%0d p2p=%0d releases=%0d", n_conflict, n_p2p, n_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
