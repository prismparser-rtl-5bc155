// bitmap_generator: decodes a protocol ID into a one-hot protocol bitmap.
//
// Bit i of the bitmap stands for protocol ID i+1; ID 0 ("no next protocol")
// and IDs beyond the bitmap width give an all-zero bitmap. Combinational.
//
// The bit numbering (bit i = ID i+1) is the one the PrismParser architecture gives.
module bitmap_generator
  import prism_pkg::*;
(
  input  proto_id_t id,
  output bitmap_t   bitmap
);

  always_comb begin
    for (int i = 0; i < N_PROTO; i++) bitmap[i] = (id == proto_id_t'(i + 1));
  end

endmodule
