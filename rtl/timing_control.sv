// timing_control -- timing and control of the selection processing module.
//
// Counts the position of the current bit within its record (records are
// rec_len bits long and follow one another on the serial bus; in_valid marks a
// bit). From the position it derives, for each of N_UNITS associative logic
// units, en (a bit of the unit's field is on the bus) and first (the field's
// first bit); a field covers KEY_BITS bits from start[i]. It also marks the
// first and last bit of a record and, one cycle after the last bit, pulses eor
// ("end of record detected"), when every unit holds its final result.
// For projection, keep marks the bits that lie in the field of a unit whose
// proj_on bit is set (every bit when none is set); the field windows used for
// this do not depend on unit_on.
// That this block selects which associative logic takes part at which time
// follows the design; field positions given as a start offset and a fixed
// width of KEY_BITS are this design's choice. Fields must lie inside the
// record (start + KEY_BITS <= rec_len) so each key register makes whole turns.
module timing_control #(
  parameter int unsigned N_UNITS  = 8,
  parameter int unsigned KEY_BITS = 16,
  parameter int unsigned POS_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [POS_BITS-1:0] rec_len,
  input  logic [POS_BITS-1:0] start [N_UNITS],
  input  logic [N_UNITS-1:0]  unit_on,
  input  logic [N_UNITS-1:0]  proj_on,   // fields that make up the projection
  input  logic                in_valid,
  output logic                sor,       // in_valid & first bit of record
  output logic                last,      // in_valid & last bit of record
  output logic [N_UNITS-1:0]  en,
  output logic [N_UNITS-1:0]  first,
  output logic                keep,      // in_valid & bit belongs to the projection
  output logic                eor        // one cycle after last
);

  logic [POS_BITS-1:0] pos_q;

  assign sor  = in_valid && (pos_q == '0);
  assign last = in_valid && (pos_q == rec_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q <= '0;
      eor   <= 1'b0;
    end else begin
      eor <= last;
      if (in_valid) pos_q <= last ? '0 : pos_q + 1'b1;
    end
  end

  logic [N_UNITS-1:0] in_field;

  always_comb begin
    for (int i = 0; i < N_UNITS; i++) begin
      in_field[i] = (pos_q >= start[i])
                    && ({1'b0, pos_q} < {1'b0, start[i]} + (POS_BITS+1)'(KEY_BITS));
      en[i]       = in_valid && unit_on[i] && in_field[i];
      first[i]    = in_valid && unit_on[i] && (pos_q == start[i]);
    end
    keep = in_valid && ((proj_on == '0) || ((in_field & proj_on) != '0));
  end

endmodule
