// match_detector: compares one masked 16-bit key chunk with the N_KEYS key
// values of a protocol and returns the next protocol ID of the matching edge.
//
// Each comparison is an XOR of the chunk with a stored key followed by a NOR
// reduction, so a hit is "all bits equal"; all comparisons run in parallel.
// The stored keys are expected already masked. When several keys hit (only a
// badly written configuration does that) the lowest-numbered key wins; an
// edge whose next ID is 0 is an unused slot. Purely combinational.
//
// The XOR/NOR match follows the PrismParser architecture; the lowest-key
// priority and ID 0 as "unused slot" are this implementation's conventions.
module match_detector
  import prism_pkg::*;
(
  input  key_t                   key,       // masked key chunk from the bus
  input  key_t      [0:N_KEYS-1] keys,      // stored key values
  input  proto_id_t [0:N_KEYS-1] next_ids,  // next protocol ID per key
  output logic      [N_KEYS-1:0] hit,       // per-key match
  output logic                   found,     // a key with a non-zero next ID matched
  output proto_id_t              next_id    // next protocol ID, 0 when none
);

  always_comb begin
    for (int k = 0; k < N_KEYS; k++) hit[k] = ~|(key ^ keys[k]);
    found   = 1'b0;
    next_id = '0;
    for (int k = N_KEYS - 1; k >= 0; k--) begin
      if (hit[k] && next_ids[k] != '0) begin
        found   = 1'b1;
        next_id = next_ids[k];
      end
    end
  end

endmodule
