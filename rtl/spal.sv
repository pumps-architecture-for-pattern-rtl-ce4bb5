// spal -- software programmable logic array.
//
// Computes Z = f(X_1..X_M) for a function f held in disjunctive normal form:
// up to N_TERMS product terms, OR-ed together. A term is written as
// {pos, neg}: bit j of pos puts the literal X_j in the term, bit j of neg puts
// ~X_j in it (both set makes the term false, neither leaves X_j out). Terms
// are entered one after another (term_we appends at the next free slot), as
// the function is loaded before a selection starts; clr erases all terms, so an
// empty SPAL gives Z = 0. full goes high when every slot is used; further
// writes are ignored. Z is combinational from x and the stored terms.
// DNF storage and sequential term entry follow the design; the literal
// encoding, term count and the clear operation are this design's choices.
module spal #(
  parameter int unsigned M       = 4,
  parameter int unsigned N_TERMS = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           term_we,
  input  logic [M-1:0]   term_pos,
  input  logic [M-1:0]   term_neg,
  input  logic [M-1:0]   x,
  output logic           z,
  output logic           full
);

  localparam int unsigned PW = $clog2(N_TERMS + 1);
  localparam int unsigned IW = (N_TERMS > 1) ? $clog2(N_TERMS) : 1;

  logic [M-1:0]  pos_q [N_TERMS];
  logic [M-1:0]  neg_q [N_TERMS];
  logic [PW-1:0] cnt_q;            // number of terms stored

  assign full = (cnt_q == PW'(N_TERMS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int t = 0; t < N_TERMS; t++) begin
        pos_q[t] <= '0;
        neg_q[t] <= '0;
      end
    end else if (clr) begin
      cnt_q <= '0;
    end else if (term_we && !full) begin
      pos_q[IW'(cnt_q)] <= term_pos;
      neg_q[IW'(cnt_q)] <= term_neg;
      cnt_q <= cnt_q + 1'b1;
    end
  end

  always_comb begin
    z = 1'b0;
    for (int t = 0; t < N_TERMS; t++)
      if (PW'(t) < cnt_q)
        z = z | (((x & pos_q[t]) == pos_q[t]) && ((~x & neg_q[t]) == neg_q[t]));
  end

endmodule
