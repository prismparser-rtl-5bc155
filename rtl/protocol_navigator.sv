// protocol_navigator: one protocol investigator per transitioning node, all
// working on the same 64-bit bus word in the same cycle.
//
// Investigator p serves protocol ID p+1 and is driven by bit p of the enable
// vector and select field p of one select/enable set. The bitmaps of all
// investigators are ORed together (found) and with the bitmap of the
// protocols parsed so far (prev) to give the updated protocol bitmap (next).
// Combinational.
//
// Structure as described for the parser; nothing here is a local choice
// beyond the port grouping.
module protocol_navigator
  import prism_pkg::*;
(
  input  logic [CHUNK_W-1:0] data,
  input  cfg_t               cfg,
  input  sel_en_t            se,     // select/enable set chosen by the controller
  input  bitmap_t            prev,   // protocols known before this word
  output bitmap_t            found,  // protocols discovered in this word
  output bitmap_t            next    // prev | found
);

  bitmap_t [N_PI-1:0] pi_bm;

  for (genvar p = 0; p < N_PI; p++) begin : g_pi
    protocol_investigator u_pi (
      .data    (data),
      .en      (se.en[p]),
      .sel     (se.sel[p]),
      .cfg     (pi_cfg(cfg, p)),
      .found   (),
      .next_id (),
      .bitmap  (pi_bm[p])
    );
  end

  always_comb begin
    found = '0;
    for (int p = 0; p < N_PI; p++) found |= pi_bm[p];
    next = prev | found;
  end

endmodule
