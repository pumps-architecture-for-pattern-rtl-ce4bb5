// assoc_logic -- bit-serial associative logic of one key: equality, threshold
// (less / greater than) and proximity search, one row of bit-slice cells.
//
// The record arrives one bit per cycle, most significant bit of each field
// first. While en is high the unit compares the data bit with the key bit from
// its circulating register and updates three state delay flip-flops:
//   e  all compared bits equal so far        e' = e & beq
//   p  exactly one compared bit differs      p' = (p & beq) | (e & ~beq)
//   l  field already known below the key     l' = l | (e & m & ~d & k)
// where beq = ~m | (d == k) and m is the mask bit (1 = bit compared). On the
// first bit of the field (first = 1) the flip-flops start from the reset value
// {e=1,p=0,l=0}, or, with cascade set, from the final state of the previous
// unit (casc_in). Cascading lets several registers act as one long key: the
// sub-keys must lie one after another in the record, and the chain then gives
// (D1>B1) | (D1=B1 & D2>B2) | ... exactly as for a single key.
// The match bit is a function of the held state:
//   CMP_EQ e, CMP_LT l, CMP_GT ~e & ~l, CMP_PROX e | p.
// The three flip-flops and their roles follow the design's cell (equality,
// proximity and threshold logic with E, X, L delay flip-flops); the boolean
// equations, the mask polarity and the definition of proximity as "at most one
// differing bit" are this design's own reading.
//
// Timing: state_q and x_match are valid from the cycle after the field's last
// bit and are held until the next field starts.
module assoc_logic
  import sel_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,       // a bit of this unit's field is on the bus
  input  logic       first,    // it is the field's first bit
  input  logic       data_bit, // S_j
  input  logic       key_bit,  // B_i,j
  input  logic       mask_bit, // M_j, 1 = compare
  input  cmp_op_e    op,
  input  logic       cascade,
  input  cmp_state_t casc_in,  // final state of the previous unit
  output cmp_state_t state_q,
  output logic       x_match
);

  cmp_state_t start_s, next_s;
  logic       beq;

  always_comb begin
    start_s = first ? (cascade ? casc_in : CMP_STATE_INIT) : state_q;
    beq     = !mask_bit || (data_bit == key_bit);
    next_s.e = start_s.e && beq;
    next_s.p = (start_s.p && beq) || (start_s.e && !beq);
    next_s.l = start_s.l || (start_s.e && mask_bit && !data_bit && key_bit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state_q <= CMP_STATE_INIT;
    else if (en)  state_q <= next_s;
  end

  always_comb begin
    unique case (op)
      CMP_EQ:   x_match = state_q.e;
      CMP_LT:   x_match = state_q.l;
      CMP_GT:   x_match = !state_q.e && !state_q.l;
      CMP_PROX: x_match = state_q.e || state_q.p;
      default:  x_match = 1'b0;
    endcase
  end

endmodule
