// mm_resolver -- multiple match resolution circuit.
//
// From a set of responding match bits it selects the first 1, the one with
// the lowest index: onehot has only that bit set, idx is its number and any
// tells whether there was a responder at all. Purely combinational. Selecting
// the first responder follows the design; "first" meaning the lowest index is
// this design's choice.
module mm_resolver #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         match,
  output logic [N-1:0]         onehot,
  output logic [$clog2(N)-1:0] idx,
  output logic                 any
);

  // match & -match isolates the lowest set bit.
  assign onehot = match & (~match + 1'b1);
  assign any    = |match;

  always_comb begin
    idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (match[i]) idx = i[$clog2(N)-1:0];
  end

endmodule
