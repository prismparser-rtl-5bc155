// protocol_investigator: the per-protocol unit of the protocol navigator.
//
// When enabled it picks one of the N_CHUNKS 16-bit chunks of the 64-bit bus
// word (select 0 is the first two bytes on the wire, held in the most
// significant bits), ANDs it with the protocol's mask, matches it against the
// protocol's keys in the match detector and decodes the next protocol ID into
// a one-hot bitmap. When disabled its bitmap is zero. Combinational; the
// select/enable pair comes from the prism controller and the mask, keys and
// next IDs from the configuration registers.
//
// Mask, match and decode follow the PrismParser architecture; the chunk
// numbering (select 0 = first bytes on the wire) is this implementation's choice.
module protocol_investigator
  import prism_pkg::*;
(
  input  logic [CHUNK_W-1:0] data,     // 64-bit bus word
  input  logic               en,       // this protocol can be parsed in this word
  input  logic [SEL_W-1:0]   sel,      // which 16-bit chunk holds its key
  input  pi_cfg_t            cfg,      // mask, keys and next IDs of this protocol
  output logic               found,    // a transition was taken
  output proto_id_t          next_id,  // the protocol that follows
  output bitmap_t            bitmap    // one-hot of next_id, zero if not found
);

  key_t            chunk;
  key_t            masked;
  logic [N_KEYS-1:0] hit;
  logic            md_found;
  proto_id_t       md_id;
  bitmap_t         decoded;

  always_comb begin
    chunk  = data[CHUNK_W - 1 - KEY_W * int'(sel) -: KEY_W];
    masked = chunk & cfg.mask;
  end

  match_detector u_md (
    .key      (masked),
    .keys     (cfg.keys),
    .next_ids (cfg.next_ids),
    .hit      (hit),
    .found    (md_found),
    .next_id  (md_id)
  );

  bitmap_generator u_bg (
    .id     (md_id),
    .bitmap (decoded)
  );

  always_comb begin
    found   = en & md_found;
    next_id = en ? md_id : '0;
    bitmap  = en ? decoded : '0;
  end

endmodule
