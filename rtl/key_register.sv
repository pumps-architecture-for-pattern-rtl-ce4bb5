// key_register -- circulating key register R_i of the selection processing
// module, together with its bit mask.
//
// The register holds a KEY_BITS key and a KEY_BITS mask. While its associative
// logic unit is enabled (shift = 1, one cycle per field bit) both rotate left by
// one place, so key_bit/mask_bit always present the bit that lines up with the
// data bit now on the serial bus, most significant bit first. After KEY_BITS
// shifts both are back where they were, so the same key serves every record
// without reloading. That the keys circulate follows the design; the separate
// per-unit mask register and the MSB-first order are choices of this design.
//
// Interface: load_key / load_mask write the whole register (and restart the
// circulation); shift rotates both. Outputs are combinational from the
// registers. Reset clears key and mask.
module key_register #(
  parameter int unsigned KEY_BITS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load_key,
  input  logic                load_mask,
  input  logic [KEY_BITS-1:0] wdata,
  input  logic                shift,
  output logic                key_bit,
  output logic                mask_bit
);

  logic [KEY_BITS-1:0] key_q, mask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      mask_q <= '0;
    end else begin
      if (load_key)       key_q <= wdata;
      else if (shift)     key_q <= {key_q[KEY_BITS-2:0], key_q[KEY_BITS-1]};
      if (load_mask)      mask_q <= wdata;
      else if (shift)     mask_q <= {mask_q[KEY_BITS-2:0], mask_q[KEY_BITS-1]};
    end
  end

  assign key_bit  = key_q[KEY_BITS-1];
  assign mask_bit = mask_q[KEY_BITS-1];

endmodule
