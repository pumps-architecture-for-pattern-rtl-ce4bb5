// record_gate -- record delay buffer and output gate of the selection module.
//
// The decision Z for a record is known only after its last bit has been
// matched, and the SPAL evaluates it while the next record is being matched.
// So every record is held back by exactly one record: the serial data is
// written into a circular buffer of DEPTH bits and read rec_len bits later.
// Because the delay is exactly one record, the bit read out sits at the same
// position in its record as the bit coming in, so the input's sor/last and
// keep (the projection mark of the bit position) apply to the delayed bit too.
// Two pipeline registers follow; the gate is applied going into the second,
// with z, which must be the decision for the delayed record from the cycle
// after that record's first delayed bit is read to the cycle after its last
// one. A bit is passed (out_valid) only when z = 1 and keep was set for it.
// out_first / out_last mark the cycles of the first and last bit position of
// an accepted record, whether or not that bit itself is passed.
// Latency for a stream without gaps: a bit leaves rec_len + 2 cycles after it
// entered. The final record of a stream comes out when one more record (any
// padding) is sent; restart (a new stream, e.g. a new record length) drops
// what the buffer holds, so the first record after it is never output
// delayed from the one before. The gate driven by Z follows the design; the
// buffer, pipeline and flush rule are this design's. DEPTH must be a power of
// two and at least the longest record.
module record_gate #(
  parameter int unsigned DEPTH    = 1024,
  parameter int unsigned POS_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [POS_BITS-1:0] rec_len,
  input  logic                restart,   // new stream: forget the buffer
  input  logic                in_valid,
  input  logic                in_bit,
  input  logic                keep,      // bit at this position is projected
  input  logic                sor,
  input  logic                last,
  input  logic                z,
  output logic                out_valid,
  output logic                out_bit,
  output logic                out_first,
  output logic                out_last
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [DEPTH-1:0] buf_q;
  logic [AW-1:0]    wptr_q, rptr;
  logic             primed_q;   // one whole record is in the buffer
  logic             v1_q, b1_q, f1_q, l1_q, k1_q;

  assign rptr = wptr_q - AW'(rec_len);

  always_ff @(posedge clk) begin
    if (in_valid) buf_q[wptr_q] <= in_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q    <= '0;
      primed_q  <= 1'b0;
      v1_q      <= 1'b0;
      b1_q      <= 1'b0;
      f1_q      <= 1'b0;
      l1_q      <= 1'b0;
      k1_q      <= 1'b0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (in_valid) wptr_q <= wptr_q + 1'b1;
      if (restart)   primed_q <= 1'b0;
      else if (last) primed_q <= 1'b1;
      v1_q      <= in_valid && primed_q;
      b1_q      <= buf_q[rptr];
      f1_q      <= sor;
      l1_q      <= last;
      k1_q      <= keep;
      out_valid <= v1_q && z && k1_q;
      out_bit   <= b1_q;
      out_first <= v1_q && z && f1_q;
      out_last  <= v1_q && z && l1_q;
    end
  end

endmodule
