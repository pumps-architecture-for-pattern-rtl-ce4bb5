// spal_tree -- tree of SPALs for more match inputs than one SPAL takes.
//
// The N_IN inputs are split into groups of SPAL_IN; each group feeds a SPAL of
// the first level. The outputs of one level are again split into groups of
// SPAL_IN and feed the next level, until a single SPAL, the root, gives Z.
// With N_IN <= SPAL_IN the tree is one SPAL; 8 inputs and 4-input SPALs give
// two leaves and a root; 16 inputs with 2-input SPALs give four levels
// (8, 4, 2, 1 SPALs). Inputs missing from the last group of a level read as 0.
// The SPALs are numbered level by level from the inputs up, in order within a
// level, so the root has the highest number; SPAL s is programmed with
// sel = s. Z is combinational through all levels.
// Partitioning the inputs and feeding the partial outputs Z_k to further
// SPALs, extended level by level, follows the design; the numbering used for
// programming is this design's choice. SELW must hold the largest number
// (N_SPALS - 1).
module spal_tree #(
  parameter int unsigned N_IN    = 8,
  parameter int unsigned SPAL_IN = 4,
  parameter int unsigned N_TERMS = 8,
  parameter int unsigned SELW    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [SELW-1:0]    sel,
  input  logic               clr,
  input  logic               term_we,
  input  logic [SPAL_IN-1:0] term_pos,
  input  logic [SPAL_IN-1:0] term_neg,
  input  logic [N_IN-1:0]    x,
  output logic               z
);

  // number of SPALs on level l (level 0 takes the inputs)
  function automatic int unsigned level_count(int unsigned l);
    int unsigned w = N_IN;
    int unsigned c = (w + SPAL_IN - 1) / SPAL_IN;
    for (int unsigned i = 0; i < l; i++) begin
      w = c;
      c = (w + SPAL_IN - 1) / SPAL_IN;
    end
    return c;
  endfunction

  // number of levels: up to and including the first level of one SPAL
  function automatic int unsigned level_total();
    int unsigned n = 1;
    while (level_count(n - 1) > 1 && n < 32) n++;  // bounded: SPAL_IN must be >= 2
    return n;
  endfunction

  // number of the first SPAL of level l
  function automatic int unsigned level_base(int unsigned l);
    int unsigned b = 0;
    for (int unsigned i = 0; i < l; i++) b += level_count(i);
    return b;
  endfunction

  localparam int unsigned LEVELS  = level_total();
  localparam int unsigned WIDTH   = level_count(0) * SPAL_IN; // inputs of level 0, padded
  localparam int unsigned N_SPALS = level_base(LEVELS);

  initial assert (N_SPALS <= (1 << SELW))
    else $error("spal_tree: SELW=%0d cannot number %0d SPALs", SELW, N_SPALS);

  for (genvar l = 0; l < LEVELS; l++) begin : g_lv
    localparam int unsigned CNT  = level_count(l);
    localparam int unsigned BASE = level_base(l);
    logic [WIDTH-1:0] xin;   // inputs of this level, padded with 0
    logic [WIDTH-1:0] zout;  // outputs of this level in bits CNT-1..0

    if (l == 0) begin : g_in
      assign xin = WIDTH'(x);
    end else begin : g_in
      assign xin = g_lv[l-1].zout;
    end

    for (genvar k = 0; k < CNT; k++) begin : g_spal
      spal #(.M(SPAL_IN), .N_TERMS(N_TERMS)) u_spal (
        .clk, .rst_n,
        .clr(clr && sel == SELW'(BASE + k)), .term_we(term_we && sel == SELW'(BASE + k)),
        .term_pos, .term_neg,
        .x(xin[k*SPAL_IN +: SPAL_IN]), .z(zout[k]), .full()
      );
    end
    if (CNT < WIDTH) begin : g_pad
      assign zout[WIDTH-1:CNT] = '0;
    end
  end

  assign z = g_lv[LEVELS-1].zout[0];

endmodule
