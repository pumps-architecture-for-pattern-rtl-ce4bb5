// selection_module -- selection processing module of a database data module:
// selection and histogramming on a serial record stream from the disk.
//
// Records arrive one bit per cycle (in_valid/in_bit), rec_len bits each, one
// after another. N_KEYS circulating key registers each feed an associative
// logic unit that compares one KEY_BITS-wide field of the record with its key
// (equal, less, greater or proximity, under a mask). The timing and control
// block enables each unit during its field. One cycle after a record's last
// bit the match bits X_1..X_n are caught in a holding register; while the next
// record is being matched a tree of SPALs computes Z = f(X_1..X_n) from them,
// and the record gate, which has delayed the record by one record, passes it
// to the output only if Z = 1. Matching and the evaluation of f thus overlap.
// Projection: units whose control word has the project bit set name the
// fields that are passed on; the other bits of an accepted record are dropped
// (with no project bit set, whole records are passed). out_first/out_last
// mark the first and last bit position of each accepted record.
//
// Histogram mode uses the same hardware: the keys hold thresholds, sorted from
// the largest (unit 0) down, with CMP_GT; each record is one pixel. Every unit
// whose threshold is below the pixel responds, the multiple match resolution
// circuit picks the first responder, the largest threshold below the pixel,
// and that counter is incremented two cycles after the pixel's last bit. A
// pixel at or below every threshold is not counted.
//
// Configuration is a simple write bus (cfg_we, cfg_addr, cfg_wdata; map in
// sel_pkg) and must be done while no records flow; writing the record length
// starts a new stream, so the buffered last record of the previous stream is
// dropped (send one padding record to get it out first). Counters are read through
// cnt_idx/cnt_data. The structure (key registers, associative logic, timing
// and control, multiple match resolution, counters, SPAL, gate) follows the
// design; sizes, bus and register map, the gate's record buffer, projection
// by marking unit fields and the ordering of thresholds are this design's
// choices.
module selection_module
  import sel_pkg::*;
#(
  parameter int unsigned N_KEYS     = 8,
  parameter int unsigned KEY_BITS   = 16,
  parameter int unsigned SPAL_IN    = 4,
  parameter int unsigned SPAL_TERMS = 8,
  parameter int unsigned CNT_BITS   = 32,
  parameter int unsigned BUF_DEPTH  = 1024,
  parameter int unsigned POS_BITS   = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration bus
  input  logic                      cfg_we,
  input  logic [11:0]               cfg_addr,
  input  logic [31:0]               cfg_wdata,
  // serial data from storage
  input  logic                      in_valid,
  input  logic                      in_bit,
  // gated output stream
  output logic                      out_valid,
  output logic                      out_bit,
  output logic                      out_first,
  output logic                      out_last,
  // status
  output logic [N_KEYS-1:0]         x_hold,     // X_1..X_n of the last record
  output logic                      z,          // decision for x_hold
  output logic                      rec_done,   // pulses when x_hold is loaded
  output logic [$clog2(N_KEYS)-1:0] first_idx,  // first responder in x_hold
  output logic                      any_match,  // x_hold has a responder
  // counters
  input  logic [$clog2(N_KEYS)-1:0] cnt_idx,
  output logic [CNT_BITS-1:0]       cnt_data
);

  // ---------------- configuration registers ----------------
  logic [POS_BITS-1:0] rec_len_q;
  sel_mode_e           mode_q;
  logic [N_KEYS-1:0]   unit_on_q;
  unit_ctrl_t          ctrl_q [N_KEYS];
  logic [POS_BITS-1:0] start [N_KEYS];
  logic [N_KEYS-1:0]   proj_on;
  logic                cnt_clr;
  logic [N_KEYS-1:0]   ld_key, ld_mask;
  logic                spal_we, spal_clr;
  logic [6:0]          spal_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_len_q <= POS_BITS'(KEY_BITS);
      mode_q    <= MODE_SELECT;
      unit_on_q <= '0;
      for (int i = 0; i < N_KEYS; i++) ctrl_q[i] <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == A_RECLEN)  rec_len_q <= cfg_wdata[POS_BITS-1:0];
      if (cfg_addr == A_MODE)    mode_q    <= sel_mode_e'(cfg_wdata[0]);
      if (cfg_addr == A_UNIT_EN) unit_on_q <= cfg_wdata[N_KEYS-1:0];
      for (int i = 0; i < N_KEYS; i++)
        if (cfg_addr == A_CTRL_BASE + 12'(i)) ctrl_q[i] <= unit_ctrl_t'(cfg_wdata);
    end
  end

  always_comb begin
    cnt_clr  = cfg_we && (cfg_addr == A_CLR_CNT);
    spal_we  = cfg_we && (cfg_addr[11:7] == A_TERM_BASE[11:7]);
    spal_clr = cfg_we && (cfg_addr[11:7] == A_TCLR_BASE[11:7]);
    spal_sel = cfg_addr[6:0];
    for (int i = 0; i < N_KEYS; i++) begin
      ld_key[i]  = cfg_we && (cfg_addr == A_KEY_BASE  + 12'(i));
      ld_mask[i] = cfg_we && (cfg_addr == A_MASK_BASE + 12'(i));
      start[i]   = POS_BITS'(ctrl_q[i].start);
      proj_on[i] = ctrl_q[i].project;
    end
  end

  // ---------------- timing and control ----------------
  logic                sor, last, eor;
  logic [N_KEYS-1:0]   en, first;
  logic                keep;

  timing_control #(.N_UNITS(N_KEYS), .KEY_BITS(KEY_BITS), .POS_BITS(POS_BITS)) u_tc (
    .clk, .rst_n, .rec_len(rec_len_q), .start, .unit_on(unit_on_q),
    .proj_on, .in_valid, .sor, .last, .en, .first, .keep, .eor
  );

  // ---------------- key registers and associative logic ----------------
  logic       key_bit [N_KEYS];
  logic       mask_bit[N_KEYS];
  cmp_state_t st      [N_KEYS];
  logic [N_KEYS-1:0] x_match;

  for (genvar i = 0; i < N_KEYS; i++) begin : g_unit
    cmp_state_t casc;
    if (i == 0) begin : g_c0
      assign casc = CMP_STATE_INIT;
    end else begin : g_ci
      assign casc = st[i-1];
    end

    key_register #(.KEY_BITS(KEY_BITS)) u_reg (
      .clk, .rst_n, .load_key(ld_key[i]), .load_mask(ld_mask[i]),
      .wdata(cfg_wdata[KEY_BITS-1:0]), .shift(en[i]),
      .key_bit(key_bit[i]), .mask_bit(mask_bit[i])
    );

    assoc_logic u_al (
      .clk, .rst_n, .en(en[i]), .first(first[i]), .data_bit(in_bit),
      .key_bit(key_bit[i]), .mask_bit(mask_bit[i]),
      .op(ctrl_q[i].op), .cascade(ctrl_q[i].cascade), .casc_in(casc),
      .state_q(st[i]), .x_match(x_match[i])
    );
  end

  // ---------------- match hold register ----------------
  logic hist_inc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_hold     <= '0;
      hist_inc_q <= 1'b0;
    end else begin
      if (eor) x_hold <= x_match & unit_on_q;
      hist_inc_q <= eor && (mode_q == MODE_HIST);
    end
  end
  assign rec_done = eor;

  // ---------------- SPAL tree ----------------
  spal_tree #(.N_IN(N_KEYS), .SPAL_IN(SPAL_IN), .N_TERMS(SPAL_TERMS), .SELW(7)) u_spal (
    .clk, .rst_n, .sel(spal_sel), .clr(spal_clr), .term_we(spal_we),
    .term_pos(cfg_wdata[SPAL_IN-1:0]), .term_neg(cfg_wdata[16 +: SPAL_IN]),
    .x(x_hold), .z
  );

  // ---------------- multiple match resolution and counters ----------------
  logic [N_KEYS-1:0]         mm_onehot;

  mm_resolver #(.N(N_KEYS)) u_mmr (
    .match(x_hold), .onehot(mm_onehot), .idx(first_idx), .any(any_match)
  );

  hist_counters #(.N(N_KEYS), .CNT_BITS(CNT_BITS)) u_cnt (
    .clk, .rst_n, .clr(cnt_clr), .inc(hist_inc_q && any_match), .sel(mm_onehot),
    .rd_idx(cnt_idx), .rd_data(cnt_data)
  );

  // ---------------- gate ----------------
  record_gate #(.DEPTH(BUF_DEPTH), .POS_BITS(POS_BITS)) u_gate (
    .clk, .rst_n, .rec_len(rec_len_q),
    .restart(cfg_we && cfg_addr == A_RECLEN), .in_valid, .in_bit, .keep, .sor, .last,
    .z(z && (mode_q == MODE_SELECT)),
    .out_valid, .out_bit, .out_first, .out_last
  );

endmodule
