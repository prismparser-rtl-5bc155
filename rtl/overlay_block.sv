// overlay_block: the modified base block that overlay parsers chain behind a
// base block, one per extra 64-bit slice of the bus.
//
// It works on the same cycle as the block before it, before that block's
// bitmap is known. Multiplexers #0 and #1 of its prism controller pick the
// N_DIR select/enable sets and candidate bitmaps of its clock number; instead
// of choosing one set, N_DIR protocol navigators apply all of them to the
// slice in parallel. When the previous block's bitmap (prev) arrives, the
// bitmap match picks the navigator whose candidate equals it, and its
// discovered protocols are ORed into prev. Only the compare and this last
// multiplexer sit on the chain from block to block. Combinational.
//
// The parallel navigators and the late selection follow the PrismParser overlay
// architecture; reusing prism_controller for multiplexers #0/#1 (its #2 output
// left open) is this implementation's choice.
module overlay_block
  import prism_pkg::*;
(
  input  logic [CLK_W-1:0]   clk_num,  // clock number this slice stands for
  input  cfg_t               cfg,
  input  ctrl_t              ctrl,
  input  logic [CHUNK_W-1:0] data,     // this block's 64-bit slice
  input  bitmap_t            prev,     // bitmap from the previous block
  output bitmap_t            next
);

  sel_en_set_t           sets;
  logic                  hit;
  logic [DIR_W-1:0]      dir;
  bitmap_t [0:N_DIR-1]   found;

  prism_controller u_ctrl (
    .clk_num (clk_num),
    .ctrl    (ctrl),
    .prev    (prev),
    .sets    (sets),
    .cands   (),
    .hit     (hit),
    .dir     (dir),
    .se      ()
  );

  for (genvar d = 0; d < N_DIR; d++) begin : g_nav
    protocol_navigator u_nav (
      .data  (data),
      .cfg   (cfg),
      .se    (sets[d]),
      .prev  ('0),
      .found (found[d]),
      .next  ()
    );
  end

  always_comb next = prev | (hit ? found[dir] : '0);

endmodule
