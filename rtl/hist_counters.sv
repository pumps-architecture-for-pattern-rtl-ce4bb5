// hist_counters -- the counters 1..n of the selection processing module, used
// for histogramming.
//
// When inc is high the counter selected by the one-hot vector sel (from the
// multiple match resolution circuit) goes up by one; counters saturate at
// their maximum instead of wrapping. clr clears all counters. A read port
// returns counter rd_idx combinationally. One counter per key register
// follows the design; the width, saturation and the read port are this
// design's choices.
module hist_counters #(
  parameter int unsigned N        = 8,
  parameter int unsigned CNT_BITS = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 inc,
  input  logic [N-1:0]         sel,
  input  logic [$clog2(N)-1:0] rd_idx,
  output logic [CNT_BITS-1:0]  rd_data
);

  logic [CNT_BITS-1:0] cnt_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < N; i++) cnt_q[i] <= '0;
    end else if (inc) begin
      for (int i = 0; i < N; i++)
        if (sel[i] && (cnt_q[i] != '1)) cnt_q[i] <= cnt_q[i] + 1'b1;
    end
  end

  assign rd_data = cnt_q[rd_idx];

endmodule
