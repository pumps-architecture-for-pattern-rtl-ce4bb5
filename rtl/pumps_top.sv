// pumps_top -- the logic of the PUMPS system that this RTL provides.
//
// PUMPS is a multiprocessor for pattern analysis and image databases: task
// processing units (TPUs) share a pool of special processors and VLSI units
// (PPVUs) through the Special Resource Arbitration Network, a shared memory
// and cache through a processor-memory network, and a backend database
// machine whose disk data modules filter records next to the disk. Only two
// parts of this system are defined down to logic: the SRAN crossbar and the
// selection processing module of a data module. They sit in different parts
// of the machine and do not connect to each other directly, so they stand side
// by side here; everything they would connect to (TPUs, PPVUs, the disk, the
// join and communication modules of the data module) is outside this RTL and
// reaches it through the ports below.
//
// sel_*: selection processing module (serial records from the disk in, gated
// records out, configuration bus, histogram counters). sran_*: the crossbar.
// Parameters keep the defaults of the two blocks.
module pumps_top #(
  parameter int unsigned N_KEYS     = 8,
  parameter int unsigned KEY_BITS   = 16,
  parameter int unsigned SPAL_IN    = 4,
  parameter int unsigned SPAL_TERMS = 8,
  parameter int unsigned CNT_BITS   = 32,
  parameter int unsigned BUF_DEPTH  = 1024,
  parameter int unsigned N_TPU      = 4,
  parameter int unsigned N_PPVU     = 4,
  parameter int unsigned DW         = 16,
  localparam int unsigned N_SRC     = N_TPU + N_PPVU,
  localparam int unsigned PW        = (N_PPVU > 1) ? $clog2(N_PPVU) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // ---- selection processing module (database data module) ----
  input  logic                      sel_cfg_we,
  input  logic [11:0]               sel_cfg_addr,
  input  logic [31:0]               sel_cfg_wdata,
  input  logic                      sel_in_valid,
  input  logic                      sel_in_bit,
  output logic                      sel_out_valid,
  output logic                      sel_out_bit,
  output logic                      sel_out_first,
  output logic                      sel_out_last,
  output logic [N_KEYS-1:0]         sel_x_hold,
  output logic                      sel_z,
  output logic                      sel_rec_done,
  output logic [$clog2(N_KEYS)-1:0] sel_first_idx,
  output logic                      sel_any_match,
  input  logic [$clog2(N_KEYS)-1:0] sel_cnt_idx,
  output logic [CNT_BITS-1:0]       sel_cnt_data,
  // ---- SRAN: TPUs and PPVUs ----
  input  logic [N_SRC-1:0]          sran_req,
  input  logic [PW-1:0]             sran_dst   [N_SRC],
  input  logic [DW-1:0]             sran_wdata [N_SRC],
  output logic [N_SRC-1:0]          sran_grant,
  output logic [DW-1:0]             sran_rdata [N_SRC],
  output logic [N_PPVU-1:0]         sran_ppvu_in_valid,
  output logic [DW-1:0]             sran_ppvu_in_data  [N_PPVU],
  input  logic [DW-1:0]             sran_ppvu_out_data [N_PPVU],
  output logic [N_PPVU-1:0]         sran_ppvu_conflict
);

  selection_module #(
    .N_KEYS(N_KEYS), .KEY_BITS(KEY_BITS), .SPAL_IN(SPAL_IN),
    .SPAL_TERMS(SPAL_TERMS), .CNT_BITS(CNT_BITS), .BUF_DEPTH(BUF_DEPTH)
  ) u_sel (
    .clk, .rst_n,
    .cfg_we(sel_cfg_we), .cfg_addr(sel_cfg_addr), .cfg_wdata(sel_cfg_wdata),
    .in_valid(sel_in_valid), .in_bit(sel_in_bit),
    .out_valid(sel_out_valid), .out_bit(sel_out_bit),
    .out_first(sel_out_first), .out_last(sel_out_last),
    .x_hold(sel_x_hold), .z(sel_z), .rec_done(sel_rec_done),
    .first_idx(sel_first_idx), .any_match(sel_any_match),
    .cnt_idx(sel_cnt_idx), .cnt_data(sel_cnt_data)
  );

  sran #(.N_TPU(N_TPU), .N_PPVU(N_PPVU), .DW(DW)) u_sran (
    .clk, .rst_n,
    .req(sran_req), .dst(sran_dst), .wdata(sran_wdata),
    .grant(sran_grant), .rdata(sran_rdata),
    .ppvu_in_valid(sran_ppvu_in_valid), .ppvu_in_data(sran_ppvu_in_data),
    .ppvu_out_data(sran_ppvu_out_data), .ppvu_conflict(sran_ppvu_conflict)
  );

endmodule
